// tb_zeus_sync: checks the transmitter's synchronisation block.
//
// Laser start: a start_key must give three impulses on the sync laser, each
// start_duty cycles long and start_period cycles apart. Then every
// sync_please must give one sync-laser pulse of sync_width cycles, starting
// count_before_laser + 3 cycles after the request (three register stages), and
// a sync_start pulse exactly 50 cycles (500 ns) after the sync laser rises,
// which is when the laser controller may start the frame.
// External start: start_key gives no impulses. A sync_please that arrives
// before any start_key must be ignored.
module tb_zeus_sync;
  import quake_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start_key = 0, sync_please = 0;
  start_type_e start_type = START_LASER;
  logic [31:0] start_duty, start_period, cbl, width;
  logic laser_sync, sync_start;
  always #5 clk = ~clk;

  zeus_sync dut (.clk, .rst_n, .start_key, .sync_please, .start_type, .start_duty,
                 .start_period, .count_before_laser(cbl), .sync_width(width),
                 .laser_sync, .sync_start);

  int cyc = 0;
  always @(posedge clk) cyc++;
  int ls_t [$], ls_len [$], ss_t [$];
  logic ls_p = 0;
  always @(negedge clk) begin
    if (laser_sync && !ls_p) begin ls_t.push_back(cyc); ls_len.push_back(1); end
    else if (laser_sync) ls_len[ls_len.size()-1]++;
    if (sync_start) ss_t.push_back(cyc);
    ls_p = laser_sync;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  initial begin
    int tp;
    for (int run = 0; run < 6; run++) begin
      start_type   = (run % 2) ? START_EXTERNAL : START_LASER;
      start_period = 4 + $urandom_range(0, 20);
      start_duty   = 1 + $urandom_range(0, start_period - 2);
      cbl          = $urandom_range(0, 10);
      width        = 1 + $urandom_range(0, 30);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      ls_t.delete(); ls_len.delete(); ss_t.delete();
      // request before start: ignored
      pulse(sync_please);
      repeat (80) @(negedge clk);
      check(ls_t.size() == 0 && ss_t.size() == 0, "sync sent before the start key");
      pulse(start_key);
      repeat (3 * start_period + 5) @(negedge clk);
      if (start_type == START_LASER) begin
        check(ls_t.size() == 3, $sformatf("%0d start impulses, expected 3", ls_t.size()));
        for (int i = 0; i < ls_t.size(); i++) begin
          check(ls_len[i] == start_duty, $sformatf("impulse %0d length %0d, expected %0d",
                                                   i, ls_len[i], start_duty));
          if (i > 0) check(ls_t[i] - ls_t[i-1] == start_period,
                           $sformatf("impulse spacing %0d, expected %0d",
                                     ls_t[i] - ls_t[i-1], start_period));
        end
      end else begin
        check(ls_t.size() == 0, "impulses sent with external start");
      end
      for (int f = 0; f < 4; f++) begin
        ls_t.delete(); ls_len.delete(); ss_t.delete();
        @(negedge clk) sync_please = 1'b1; tp = cyc;
        @(negedge clk) sync_please = 1'b0;
        repeat (cbl + width + 70) @(negedge clk);
        check(ls_t.size() == 1 && ss_t.size() == 1,
              $sformatf("frame %0d: %0d sync pulses, %0d sync_start", f, ls_t.size(), ss_t.size()));
        if (ls_t.size() == 1 && ss_t.size() == 1) begin
          check(ls_t[0] - tp == cbl + 3, $sformatf("sync laser %0d cycles after request, expected %0d",
                                                  ls_t[0] - tp, cbl + 3));
          check(ls_len[0] == width, $sformatf("sync width %0d, expected %0d", ls_len[0], width));
          check(ss_t[0] - ls_t[0] == 50, $sformatf("sync_start %0d cycles after sync laser, expected 50",
                                                  ss_t[0] - ls_t[0]));
        end
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
