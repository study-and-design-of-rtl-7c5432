// tb_hermes_sync: checks the receiver's synchronisation block.
//
// The sync-laser detector is driven asynchronously (pulses start 3 ns after
// a falling clock edge). Laser start: three impulses must give one start_key
// pulse of two cycles; two impulses followed by silence must time out and
// give nothing. Every later sync pulse must give one sync_start exactly
// delay_before_sync + 1 cycles after the first clock edge that follows the
// detector edge (the synchroniser cycles count towards the delay).
// External start: a rising external_start must give start_red and start_key
// without any impulse. Raising full must return the block to idle, so later
// sync pulses are ignored.
module tb_hermes_sync;
  import quake_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, sync_laser = 0, external_start = 0, full = 0;
  start_type_e start_type = START_LASER;
  logic [31:0] start_period = 20, dbs = 50;
  logic start_key, start_red, sync_start;
  always #5 clk = ~clk;

  hermes_sync dut (.clk, .rst_n, .sync_laser, .external_start, .start_type, .start_period,
                   .delay_before_sync(dbs), .full, .start_key, .start_red, .sync_start);

  int cyc = 0;
  always @(posedge clk) cyc++;
  int sk_t [$], sk_len [$], ss_t [$], sr_n = 0;
  logic sk_p = 0;
  always @(negedge clk) begin
    if (start_key && !sk_p) begin sk_t.push_back(cyc); sk_len.push_back(1); end
    else if (start_key) sk_len[sk_len.size()-1]++;
    if (sync_start) ss_t.push_back(cyc);
    if (start_red) sr_n++;
    sk_p = start_key;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  // one detector pulse of w cycles, starting 3 ns after a falling edge;
  // returns the cycle number of that falling edge
  task automatic sync_pulse(int w, output int t);
    @(negedge clk); t = cyc;
    #3 sync_laser = 1;
    repeat (w) @(negedge clk);
    #3 sync_laser = 0;
  endtask

  task automatic restart();
    rst_n = 0; full = 0; external_start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sk_t.delete(); sk_len.delete(); ss_t.delete(); sr_n = 0;
  endtask

  initial begin
    int t;
    for (int run = 0; run < 4; run++) begin
      dbs = 10 + $urandom_range(0, 60);
      // --- incomplete start: two impulses then silence ---
      start_type = START_LASER;
      restart();
      repeat (2) begin sync_pulse(5, t); repeat (14) @(negedge clk); end
      repeat (100) @(negedge clk);
      check(sk_t.size() == 0, "start key after only two impulses");
      // --- laser start ---
      repeat (3) begin sync_pulse(5, t); repeat (14) @(negedge clk); end
      repeat (5) @(negedge clk);
      check(sk_t.size() == 1, $sformatf("%0d start keys after three impulses", sk_t.size()));
      if (sk_t.size() == 1) check(sk_len[0] == 2, $sformatf("start key %0d cycles long", sk_len[0]));
      for (int f = 0; f < 5; f++) begin
        ss_t.delete();
        sync_pulse(1 + $urandom_range(0, 8), t);
        repeat (dbs + 20) @(negedge clk);
        check(ss_t.size() == 1, $sformatf("%0d sync_start for one sync pulse", ss_t.size()));
        if (ss_t.size() == 1)
          check(ss_t[0] - t == dbs + 2,
                $sformatf("sync_start %0d cycles after the edge, expected %0d", ss_t[0] - t - 1, dbs + 1));
      end
      // --- full stops the block ---
      @(negedge clk) full = 1;
      @(negedge clk) full = 0;
      ss_t.delete();
      sync_pulse(5, t);
      repeat (dbs + 20) @(negedge clk);
      check(ss_t.size() == 0, "sync_start after full");
      // --- external start ---
      start_type = START_EXTERNAL;
      restart();
      sync_pulse(5, t); repeat (10) @(negedge clk);
      sync_pulse(5, t); repeat (10) @(negedge clk);
      sync_pulse(5, t); repeat (dbs + 20) @(negedge clk);
      check(sk_t.size() == 0 && ss_t.size() == 0, "external mode reacted to impulses");
      @(negedge clk) external_start = 1;
      repeat (10) @(negedge clk);
      check(sk_t.size() == 1 && sr_n == 1, "external start not taken exactly once");
      ss_t.delete();
      sync_pulse(3, t);
      repeat (dbs + 20) @(negedge clk);
      check(ss_t.size() == 1 && ss_t[0] - t == dbs + 2, "sync_start timing in external mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
