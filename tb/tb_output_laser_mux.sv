// tb_output_laser_mux: checks the selector between the key transmitter and
// the pointing driver. For random input values, the outputs must equal the
// pointing signals when pointing_enable is high and the transmitter signals
// otherwise. The block is combinational, so the testbench applies a vector,
// waits 1 ns and compares.
module tb_output_laser_mux;
  int checks = 0, failures = 0;
  logic       pe, txs, pts, laser_sync;
  logic [3:0] txl, ptl, lasers;

  output_laser_mux dut (.pointing_enable(pe), .tx_lasers(txl), .tx_laser_sync(txs),
                        .pointing_lasers(ptl), .pointing_laser_sync(pts),
                        .lasers, .laser_sync);

  initial begin
    for (int i = 0; i < 500; i++) begin
      {pe, txs, pts} = 3'($urandom);
      txl = 4'($urandom); ptl = 4'($urandom);
      #1;
      checks++;
      if (lasers !== (pe ? ptl : txl) || laser_sync !== (pe ? pts : txs)) begin
        failures++;
        $display("ERROR pe=%b tx=%b/%b pt=%b/%b out=%b/%b", pe, txl, txs, ptl, pts,
                 lasers, laser_sync);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
