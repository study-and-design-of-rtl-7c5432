// tb_reflex_photon_translator: checks the asynchronous click catcher.
//
// Detector clicks are short pulses (3 ns here, less than the 10 ns clock)
// that arrive at random phases. Inside the reading window (reflex_enable
// high) every click must be held until the clock samples it: it must be
// seen high at the first rising edge after the click and low again after
// the second, so a slot is never polluted by the previous one. Clicks with
// reflex_enable low must be ignored, and reset must clear the outputs.
module tb_reflex_photon_translator;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, reflex_enable = 1'b0;
  logic [3:0] spd = '0, reflex_out;
  always #5 clk = ~clk;

  reflex_photon_translator dut (.clk, .rst_n, .reflex_enable, .spd, .reflex_out);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 300; k++) begin
      logic [3:0] ch;
      int ph;
      bit en;
      ch = 4'($urandom_range(1, 15));
      en = ($urandom_range(0, 3) != 0);
      ph = $urandom_range(1, 5);                 // ns after the rising edge
      @(posedge clk); #1;
      reflex_enable = en;
      #(ph) spd = ch;
      #3    spd = '0;
      // first rising edge after the click
      @(posedge clk); #1;
      check(reflex_out == (en ? ch : 4'b0),
            $sformatf("after 1st edge out=%b expected %b (ph %0d)", reflex_out, en ? ch : 4'b0, ph));
      @(posedge clk); #1;
      check(reflex_out == 4'b0, $sformatf("after 2nd edge out=%b, expected cleared", reflex_out));
      reflex_enable = 1'b0;
    end
    // reset clears a held click
    @(negedge clk) reflex_enable = 1'b1; #2 spd = 4'b1010; #2 spd = '0; rst_n = 1'b0;
    @(posedge clk); #1;
    check(reflex_out == 4'b0, "reset did not clear the outputs");
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
