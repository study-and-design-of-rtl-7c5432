// tb_clock_drift_counter: checks the clock-drift measurement counter.
//
// The counter emits a one-cycle "go" pulse, counts the selected number of
// cycles and emits a one-cycle "stop" pulse; an oscilloscope compares the
// go/stop distance of two boards. The counts are shortened to 100, 1000
// and 5000 through the parameters. For every selection the testbench
// checks that go-to-stop is exactly the selected count, that both pulses
// last one cycle and that measurements repeat back to back.
module tb_clock_drift_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, go, stop;
  logic [1:0] sel = 0;
  always #5 clk = ~clk;

  clock_drift_counter #(.COUNT_SHORT(100), .COUNT_MEDIUM(1000), .COUNT_LONG(5000))
    dut (.clk, .rst_n, .sel, .go, .stop);

  int cyc = 0;
  always @(posedge clk) cyc++;

  // pulse recorder: rise times and lengths of go and stop
  int go_t [$], stop_t [$], go_len [$], stop_len [$];
  logic go_p = 0, stop_p = 0;
  always @(negedge clk) begin
    if (go && !go_p) begin go_t.push_back(cyc); go_len.push_back(1); end
    else if (go) go_len[go_len.size()-1]++;
    if (stop && !stop_p) begin stop_t.push_back(cyc); stop_len.push_back(1); end
    else if (stop) stop_len[stop_len.size()-1]++;
    go_p = go; stop_p = stop;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  initial begin
    int n, tg, ts;
    repeat (3) @(negedge clk);
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      n = (s == 0) ? 100 : (s == 1) ? 1000 : 5000;
      go_t.delete(); stop_t.delete(); go_len.delete(); stop_len.delete();
      repeat (3 * (n + 1) + 2) @(negedge clk);
      check(go_t.size() >= 3 && stop_t.size() >= 3, "fewer than three measurements");
      for (int r = 0; r < 3 && r < go_t.size() && r < stop_t.size(); r++) begin
        check(stop_t[r] - go_t[r] == n,
              $sformatf("sel %0d: go to stop %0d cycles, expected %0d", s, stop_t[r] - go_t[r], n));
        check(go_len[r] == 1 && stop_len[r] == 1, "go or stop longer than one cycle");
        if (r > 0) check(go_t[r] - go_t[r-1] == n + 1, "measurements not back to back");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
