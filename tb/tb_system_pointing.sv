// tb_system_pointing: checks the alignment ("pointing") laser driver.
//
// With the block enabled, the selected lasers must blink with the configured
// period and duty cycle (laser_duty cycles on, laser_period - laser_duty
// off), the unselected lasers must stay dark, and the sync laser must follow
// its switch. With the block disabled every output must be low. Several
// random switch settings, periods and duty cycles are tried.
module tb_system_pointing;
  import quake_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, sw_sync = 1'b0;
  logic [3:0] sw_lasers = '0, lasers;
  logic [31:0] duty, period;
  logic laser_sync;
  always #5 clk = ~clk;

  system_pointing dut (.clk, .rst_n, .enable, .sw_lasers, .sw_sync,
                       .laser_duty(duty), .laser_period(period), .lasers, .laser_sync);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  initial begin
    duty = 2; period = 5;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      int on [4];
      int sync_on, n, run_len, max_run;
      period = 2 + $urandom_range(0, 10);
      duty   = 1 + $urandom_range(0, period - 2);
      sw_lasers = 4'($urandom_range(1, 15));
      sw_sync = 1'($urandom_range(0, 1));
      enable = 1'b1;
      repeat (3 * period) @(negedge clk);
      n = 10 * period;
      on = '{default: 0}; sync_on = 0; run_len = 0; max_run = 0;
      for (int c = 0; c < n; c++) begin
        @(negedge clk);
        for (int l = 0; l < 4; l++) if (lasers[l]) on[l]++;
        if (laser_sync) sync_on++;
        if (lasers != 0) begin
          run_len++;
          if (run_len > max_run) max_run = run_len;
          check(lasers == sw_lasers, $sformatf("lit lasers %b, switches %b", lasers, sw_lasers));
        end else run_len = 0;
      end
      for (int l = 0; l < 4; l++)
        check(on[l] == (sw_lasers[l] ? 10 * duty : 0),
              $sformatf("laser %0d on %0d of %0d cycles, expected %0d", l, on[l], n,
                        sw_lasers[l] ? 10 * duty : 0));
      check(max_run == duty, $sformatf("pulse length %0d, expected %0d", max_run, duty));
      check(sync_on == (sw_sync ? n : 0), "sync laser does not follow its switch");
      enable = 1'b0;
      repeat (2) @(negedge clk);
      for (int c = 0; c < 2 * period; c++) begin
        @(negedge clk);
        check(lasers == 0 && laser_sync == 0, "lasers lit while pointing disabled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
