// tb_reset_handler: checks the reset generator.
//
// The debouncer is shortened to 20 cycles through its parameter. The
// testbench checks that the software reset asserts rst_n low immediately
// (asynchronously, before the next clock edge) and that rst_n rises
// SYNC_STAGES (2) clock edges after the request is removed; that a button
// glitch shorter than the debounce time does nothing; and that a button held
// longer than the debounce time gives a reset that starts 2 + 20 cycles
// after the press (synchroniser plus debounce) and ends the same way after
// the release.
module tb_reset_handler;
  int checks = 0, failures = 0;
  logic clk = 1'b0, sw_rst = 1'b0, btn_rst = 1'b0, rst_n;
  always #5 clk = ~clk;

  reset_handler #(.DEBOUNCE_CYCLES(20)) dut (.clk, .sw_rst, .btn_rst, .rst_n);

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  int t0, lows;
  initial begin
    // power-up: a software reset pulse brings the chain to a known state
    sw_rst = 1'b1;
    repeat (3) @(negedge clk);
    sw_rst = 1'b0;
    repeat (5) @(negedge clk);
    check(rst_n === 1'b1, "rst_n not released after power-up reset");

    for (int k = 0; k < 5; k++) begin
      // asynchronous assertion: mid-cycle, no clock edge needed
      @(negedge clk); #2 sw_rst = 1'b1; #1;
      check(rst_n === 1'b0, "software reset not asserted asynchronously");
      repeat (1 + $urandom_range(0, 4)) @(negedge clk);
      sw_rst = 1'b0; t0 = cyc;
      wait (rst_n === 1'b1);
      check(cyc - t0 == 2, $sformatf("rst_n released %0d edges after the request, expected 2", cyc - t0));
      repeat (4) @(negedge clk);
    end

    // button glitch (bounce) shorter than the debounce time
    lows = 0;
    for (int b = 0; b < 6; b++) begin
      btn_rst = 1'b1; repeat (3) @(negedge clk);
      btn_rst = 1'b0; repeat (2) @(negedge clk);
    end
    repeat (40) begin @(negedge clk); if (!rst_n) lows++; end
    check(lows == 0, "button bounce produced a reset");

    // held button
    @(negedge clk) btn_rst = 1'b1; t0 = cyc;
    wait (rst_n === 1'b0);
    check(cyc - t0 >= 20 && cyc - t0 <= 24,
          $sformatf("button reset after %0d cycles, expected about 22", cyc - t0));
    repeat (30) @(negedge clk);
    check(rst_n === 1'b0, "reset not held while the button is pressed");
    btn_rst = 1'b0; t0 = cyc;
    wait (rst_n === 1'b1);
    check(cyc - t0 >= 22 && cyc - t0 <= 26,
          $sformatf("button release after %0d cycles, expected about 24", cyc - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
