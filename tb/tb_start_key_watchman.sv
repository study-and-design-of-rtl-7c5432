// tb_start_key_watchman: checks the start-key pulse generator.
//
// Software raises start_req as a level and keeps it high for an arbitrary
// time. The testbench checks that each rising edge gives exactly one
// start_key pulse of PULSE_CYCLES (2) cycles starting one cycle after the
// edge, that a held level gives nothing more, that a request already high
// when reset is released is ignored, and that requests shorter than the
// pulse still give a full pulse.
module tb_start_key_watchman;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start_req = 1'b0, start_key;
  always #5 clk = ~clk;

  start_key_watchman dut (.clk, .rst_n, .start_req, .start_key);

  int cyc = 0, highs = 0, pulses = 0, last_rise = -1;
  logic prev = 1'b0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (start_key) highs++;
    if (start_key && !prev) begin pulses++; last_rise = cyc; end
    prev = start_key;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  task automatic request(int hold);
    int h0, p0, t0;
    h0 = highs; p0 = pulses;
    @(negedge clk) start_req = 1'b1; t0 = cyc;
    repeat (hold) @(negedge clk);
    start_req = 1'b0;
    repeat (8) @(negedge clk);
    check(pulses - p0 == 1, $sformatf("hold %0d: %0d pulses, expected 1", hold, pulses - p0));
    check(highs - h0 == 2, $sformatf("hold %0d: start_key high %0d cycles, expected 2", hold, highs - h0));
    check(last_rise - t0 == 1, $sformatf("hold %0d: pulse %0d cycles after the request", hold, last_rise - t0));
  endtask

  initial begin
    start_req = 1'b1;              // held through reset
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(pulses == 0, "request held through reset produced a pulse");
    start_req = 1'b0;
    repeat (3) @(negedge clk);
    request(1);
    request(2);
    request(50);
    for (int i = 0; i < 20; i++) request(1 + $urandom_range(0, 30));
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
