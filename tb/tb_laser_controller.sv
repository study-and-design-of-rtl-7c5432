// tb_laser_controller: checks the transmitter's laser FSM on its own.
//
// A behavioural key reader answers data_red with the next 2-bit key unit and
// raises empty after the last one; a behavioural sync module answers every
// sync_please with a sync_start 7 cycles later. The testbench records every
// laser pulse and checks its channel against the key (BB84: channel
// {basis, bit}; B92: channel 0 or 2 per bit, two slots per key unit), its
// length (laser_duty cycles), the slot spacing (laser_period cycles inside a
// frame), the first pulse 2 cycles after sync_start, one sync request per
// frame, the data_red rate and the return to idle at the end of the key.
// A third run uses a 100 % duty cycle, where the lasers must never go dark
// inside a frame.
module tb_laser_controller;
  import quake_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               start_key = 1'b0, sync_start = 1'b0, empty;
  protocol_e          protocol = PROTO_BB84;
  logic [31:0]        duty, period, frame;
  logic [1:0]         data_in;
  logic               data_red, sync_please;
  logic [3:0]         lasers;

  laser_controller dut (.clk, .rst_n, .start_key, .sync_start, .protocol,
    .laser_duty(duty), .laser_period(period), .frame_size(frame),
    .data_in, .empty, .data_red, .sync_please, .lasers);

  // key reader model
  int unsigned nunits, uidx;
  function automatic logic [1:0] unit_of(int unsigned u);
    return 2'((u * 7 + 3) ^ (u >> 2));
  endfunction
  assign data_in = unit_of(uidx);
  assign empty   = (uidx >= nunits);
  int reds = 0;
  always @(negedge clk) if (data_red) begin uidx = uidx + 1; reds++; end

  // sync model
  int syncs = 0;
  int sync_time;
  always @(negedge clk) if (sync_please) begin
    syncs++;
    fork begin
      repeat (6) @(negedge clk);
      sync_start = 1'b1; sync_time = cyc_now;
      @(negedge clk) sync_start = 1'b0;
    end join_none
  end

  int cyc_now = 0;
  always @(posedge clk) cyc_now++;

  // pulse recorder
  int          np;
  logic [3:0]  pval [$];
  int          pstart [$];
  int          plen [$];
  int          psync [$];
  logic [3:0]  prev = '0;
  always @(negedge clk) begin
    if (lasers != 0 && lasers != prev) begin
      pval.push_back(lasers); pstart.push_back(cyc_now); plen.push_back(1);
      psync.push_back(sync_time);
    end else if (lasers != 0 && plen.size() > 0) begin
      plen[plen.size()-1]++;
    end
    prev = lasers;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  task automatic run(protocol_e pr, int unsigned p, int unsigned d, int unsigned f,
                     int unsigned n);
    int unsigned slots, s;
    logic [3:0] exp_v;
    int unsigned t0;
    protocol = pr; period = p; duty = d; frame = f; nunits = n;
    rst_n = 1'b0; uidx = 0; reds = 0; syncs = 0;
    pval.delete(); pstart.delete(); plen.delete(); psync.delete();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start_key <= 1'b1; @(posedge clk); start_key <= 1'b0;
    t0 = cyc_now;
    wait (empty);
    repeat (3 * p + 20) @(posedge clk);
    slots = (pr == PROTO_B92) ? 2 * n : n;
    check(dut.state == 0, "controller not back in idle at the end of the key");
    check(reds == n, $sformatf("data_red count %0d, expected %0d", reds, n));
    check(syncs == (slots + f - 1) / f, $sformatf("sync requests %0d, expected %0d",
                                                   syncs, (slots + f - 1) / f));
    if (d < p) begin
      check(pval.size() == slots, $sformatf("%0d pulses, expected %0d", pval.size(), slots));
      for (s = 0; s < slots && s < pval.size(); s++) begin
        if (pr == PROTO_BB84) exp_v = 4'b0001 << unit_of(s);
        else exp_v = ((s % 2 != 0) ? unit_of(s / 2)[1] : unit_of(s / 2)[0]) ? 4'b0100 : 4'b0001;
        check(pval[s] == exp_v, $sformatf("slot %0d laser %b expected %b", s, pval[s], exp_v));
        check(plen[s] == d, $sformatf("slot %0d on for %0d cycles, expected %0d", s, plen[s], d));
        if (s % f != 0)
          check(pstart[s] - pstart[s-1] == p,
                $sformatf("slot %0d spacing %0d, expected %0d", s, pstart[s] - pstart[s-1], p));
        else
          check(pstart[s] - psync[s] == 2,
                $sformatf("frame start %0d cycles after sync_start, expected 2", pstart[s] - psync[s]));
      end
    end
  endtask

  initial begin
    run(PROTO_BB84, 5, 2, 4, 10);
    run(PROTO_B92, 3, 1, 3, 5);
    // 100 % duty: lasers lit in every cycle of a 4-slot frame
    begin
      int lit, first;
      protocol = PROTO_BB84; period = 4; duty = 4; frame = 4; nunits = 4;
      rst_n = 1'b0; uidx = 0; syncs = 0;
      repeat (3) @(posedge clk);
      rst_n <= 1'b1; @(posedge clk);
      start_key <= 1'b1; @(posedge clk); start_key <= 1'b0;
      wait (lasers != 0);
      lit = 0;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        if (lasers != 0) lit++;
      end
      check(lit == 16, $sformatf("100%% duty: lit %0d of 16 cycles", lit));
      @(negedge clk);
      check(lasers == 0, "100% duty: lasers still on after the frame");
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
