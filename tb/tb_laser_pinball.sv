// tb_laser_pinball: checks the receiver's slot reader.
//
// The testbench plays the part of the synchroniser (sync_start pulses) and
// of the click catcher (reflex_in, one click pattern at a random cycle of
// each slot). The first frame is started late on purpose: the first sync
// may take any time. For every slot it checks that one word with the
// slot's clicks comes out on data_out with new_data, that new_data pulses
// are exactly laser_period cycles apart inside a frame, and that the
// detector window (reflex_enable) is open for laser_duty - 1 cycles per
// slot. Some frames get no sync at all: the block must then flag
// missed_sync once and emit a whole frame of 1111 words (the slots that
// went by while it waited for the sync come out at once, the rest one per
// laser_period) and pick up the next sync normally. Raising full must stop
// all output.
module tb_laser_pinball;
  import quake_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start_key = 0, sync_start = 0, full = 0;
  logic [31:0] duty, period, frame, cbl = 4, dbs = 10;
  logic [3:0]  reflex_in = 0, data_out;
  logic        reflex_enable, new_data, missed_sync;
  always #5 clk = ~clk;

  laser_pinball dut (.clk, .rst_n, .start_key, .sync_start, .full, .laser_duty(duty),
    .laser_period(period), .frame_size(frame), .count_before_laser(cbl),
    .delay_before_sync(dbs), .reflex_in, .reflex_enable, .data_out, .new_data, .missed_sync);

  int cyc = 0;
  always @(posedge clk) cyc++;
  logic [3:0] got [$];
  int got_t [$];
  int missed = 0;
  always @(negedge clk) begin
    if (new_data) begin got.push_back(data_out); got_t.push_back(cyc); end
    if (missed_sync) missed++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  logic [3:0] expv [$];
  int frame_first [$];   // index of the first word of each frame

  task automatic run(int p, int d, int f, int nframes, int drop_a, int drop_b);
    int n0, en_cnt, win, errs;
    period = p; duty = d; frame = f;
    win = (d > p) ? p - 1 : d - 1;
    rst_n = 0; @(negedge clk) rst_n = 1;
    got.delete(); got_t.delete(); expv.delete(); frame_first.delete(); missed = 0;
    @(negedge clk) start_key = 1; @(negedge clk) start_key = 0;
    repeat (300) @(negedge clk);       // slow first sync: no watchdog yet
    for (int fr = 0; fr < nframes; fr++) begin
      frame_first.push_back(expv.size());
      if (fr == drop_a || fr == drop_b) begin
        n0 = got.size();
        repeat (f) expv.push_back(4'hF);
        while (got.size() < n0 + f) @(negedge clk);
      end else begin
        @(negedge clk) sync_start = 1;
        @(negedge clk) sync_start = 0;
        for (int s = 0; s < f; s++) begin
          logic [3:0] v;
          int j;
          v = 4'($urandom); j = $urandom_range(0, p - 1);
          expv.push_back(v);
          en_cnt = 0;
          for (int c = 0; c < p; c++) begin
            reflex_in = (c == j) ? v : 4'b0;
            if (reflex_enable) en_cnt++;
            @(negedge clk);
          end
          check(en_cnt == win, $sformatf("window open %0d cycles, expected %0d", en_cnt, win));
        end
        reflex_in = 0;
      end
      repeat (12) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(got.size() == expv.size(), $sformatf("%0d words, expected %0d", got.size(), expv.size()));
    errs = 0;
    for (int i = 0; i < got.size() && i < expv.size(); i++) begin
      checks++;
      if (got[i] !== expv[i]) begin
        failures++; errs++;
        if (errs < 8) $display("ERROR word %0d: %b expected %b", i, got[i], expv[i]);
      end
      // in a frame without sync the slots that already went by during the
      // wait for the sync are emitted at once, then one per laser_period
      if (i % f != 0 && !(expv[i] == 4'hF && (i / f == drop_a || i / f == drop_b) && i % f < 3))
        check(got_t[i] - got_t[i-1] == p,
              $sformatf("word %0d spacing %0d, expected %0d", i, got_t[i] - got_t[i-1], p));
    end
    check(missed == (drop_a >= 0) + (drop_b >= 0),
          $sformatf("missed_sync %0d times", missed));
    // full stops everything
    @(negedge clk) sync_start = 1; @(negedge clk) sync_start = 0;
    repeat (p + 1) @(negedge clk);
    full = 1; @(negedge clk) full = 0;
    n0 = got.size();
    repeat (3 * p * f + 100) @(negedge clk);
    check(got.size() == n0, "words after full");
    check(dut.state == 0, "not idle after full");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(10, 5, 8, 6, 2, -1);
    run(4, 4, 5, 7, 1, 4);
    run(2, 1, 10, 4, -1, -1);
    run(7, 9, 3, 5, 3, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
