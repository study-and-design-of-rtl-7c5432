// tb_quake_top: end-to-end test of the transmitter and receiver boards.
//
// The top is instantiated with every parameter at its default (8192-word
// RAMs, 500 ns sync delay). The two boards get separate clocks: 100 MHz for
// the transmitter, and for the receiver a clock 4 ppm slower (40 ns per
// 10 ms, one oscillator's measured error from ideal, used as a worst case for
// the difference between two boards) with a 3 ns phase offset. A
// bench "coaxial cable" channel connects each laser pin to the matching
// detector pin and can drop chosen sync pulses.
//
// The testbench plays the role of the software and DMA: it writes the
// parameters, fills the key RAM, refills the half just read on every
// transmitter interrupt, drains the half just written on every receiver
// interrupt, and compares every received word with the word expected from
// the key (one-hot detector nibble per BB84 slot, 2-bit field per B92 slot,
// all ones for slots of a frame whose sync was dropped).
//
// Scenarios, each after a software reset of both boards:
//   1 BB84, start with laser, 10 MHz slots at 50 % duty, frames of 1000,
//     140000 key units: wraps the transmit RAM once and the receive RAM
//     twice; the sync of frame 3 is dropped (emergency frame).
//   2 B92, start over the external channel, 100 % duty, 4-cycle slots,
//     frames of 50, 3000 key units (6000 qubits); frame 5's sync dropped.
//   3 Refill too late: the bus keeps writing the RAM when the reader reaches
//     the half -> tangled_alarm, transmission stops, start is ignored.
//   4 Alignment (pointing) mode: selected lasers pulse with the set period
//     and duty, the sync laser is on.
//   5 Longest frames: 200000 qubits per frame at 10 MHz (20 ms between
//     syncs), 400000 key units, receiver clock 0.5 ppm slow (5 ns per 10 ms,
//     the difference between two boards): no errors allowed.
//   6 Slowest qubit rate: 10 kHz slots (10000 cycles) at 20 % duty.
//   7 Shortest pulse: 10 MHz at 20 % duty (2 cycles on, so the receiver
//     window is 1 cycle), frames of 10 qubits (a sync every 100 cycles).
// (Scenarios 5 to 7 run between 2 and 3.)
// Each mechanism is counted and must have happened at least once.
`timescale 1ns/1fs
module tb_quake_top;
  import quake_pkg::*;

  localparam int unsigned DEPTH = 8192;
  localparam int unsigned HALF  = DEPTH / 2;
  localparam int unsigned AW    = 15;

  int checks = 0, failures = 0;

  // ---------------- clocks ----------------
  logic clk_alice = 1'b0, clk_bob = 1'b0, clk_meas = 1'b0;
  realtime bob_half = 5.0 * (1.0 + 4.0e-6);
  initial forever #5.0 clk_alice = ~clk_alice;
  initial begin #3.0; forever #(bob_half) clk_bob = ~clk_bob; end
  initial forever #5.0 clk_meas = ~clk_meas;

  // ---------------- DUT ----------------
  logic                alice_sw_rst = 1'b1, bob_sw_rst = 1'b1;
  logic                alice_start_req = 1'b0, bob_external_start = 1'b0;
  alice_params_t       ap;
  bob_params_t         bp;
  logic                sw_pointing_en = 1'b0, sw_sync = 1'b0;
  logic [3:0]          sw_lasers = '0;
  logic                a_en = 1'b0, a_we = 1'b0, b_en = 1'b0;
  logic [AW-1:0]       a_addr = '0, b_addr = '0;
  logic [31:0]         a_din = '0, a_dout, b_dout;
  logic [3:0]          alice_lasers, bob_spd;
  logic                alice_laser_sync, bob_spd_sync;
  logic                alice_interrupt, alice_tangled, alice_empty;
  logic                bob_interrupt, bob_full, bob_missed, bob_start_red;
  logic                meas_go, meas_stop;

  quake_top dut (
    .clk_alice(clk_alice), .alice_btn_rst(1'b0), .alice_sw_rst(alice_sw_rst),
    .alice_start_req(alice_start_req), .alice_params(ap),
    .alice_sw_pointing_en(sw_pointing_en), .alice_sw_lasers(sw_lasers),
    .alice_sw_sync(sw_sync),
    .alice_bram_b_en(a_en), .alice_bram_b_we(a_we), .alice_bram_b_addr(a_addr),
    .alice_bram_b_din(a_din), .alice_bram_b_dout(a_dout),
    .alice_lasers(alice_lasers), .alice_laser_sync(alice_laser_sync),
    .alice_interrupt(alice_interrupt), .alice_tangled_alarm(alice_tangled),
    .alice_empty(alice_empty),
    .clk_bob(clk_bob), .bob_btn_rst(1'b0), .bob_sw_rst(bob_sw_rst),
    .bob_external_start(bob_external_start), .bob_params(bp),
    .bob_spd(bob_spd), .bob_spd_sync(bob_spd_sync),
    .bob_bram_b_en(b_en), .bob_bram_b_we(1'b0), .bob_bram_b_addr(b_addr),
    .bob_bram_b_din(32'd0), .bob_bram_b_dout(b_dout),
    .bob_interrupt(bob_interrupt), .bob_full(bob_full),
    .bob_missed_sync(bob_missed), .bob_start_red(bob_start_red),
    .clk_meas(clk_meas), .meas_rst_n(1'b0), .meas_sel(2'd0),
    .meas_go(meas_go), .meas_stop(meas_stop));

  // ---------------- channel: cable with a sync-pulse dropper ----------------
  int sync_edges = 0;      // rising edges of the transmitter's sync laser
  int drop_edge  = -1;     // edge number whose pulse is lost
  logic drop_now = 1'b0;
  always @(posedge alice_laser_sync) begin
    sync_edges++;
    drop_now = (sync_edges == drop_edge);
  end
  assign bob_spd      = alice_lasers;
  assign bob_spd_sync = alice_laser_sync & ~drop_now;

  // ---------------- key and expected receive words ----------------
  function automatic logic [31:0] key_word(int unsigned i);
    logic [31:0] x;
    x = i * 32'h9E37_79B9 + 32'h7F4A_7C15;
    x = x ^ (x >> 15);
    x = x * 32'h85EB_CA6B;
    x = x ^ (x >> 13);
    return x;
  endfunction
  function automatic logic [1:0] key_unit(int unsigned u);
    logic [31:0] w;
    w = key_word(u / 16);
    return w[2*(u%16) +: 2];
  endfunction

  protocol_e    cur_proto;
  int unsigned  cur_units, cur_frame, dropped_frame;

  function automatic logic [31:0] expected_word(int unsigned j);
    logic [31:0] e;
    int unsigned slots, s, fr;
    logic [1:0] u;
    e = '0;
    slots = (cur_proto == PROTO_B92) ? 2 * cur_units : cur_units;
    if (cur_proto == PROTO_BB84) begin
      for (int k = 0; k < 8; k++) begin
        s = j * 8 + k;
        if (s < slots) begin
          fr = s / cur_frame;
          u  = key_unit(s);
          e[4*k +: 4] = (fr == dropped_frame) ? 4'hF : (4'b0001 << u);
        end
      end
    end else begin
      for (int k = 0; k < 16; k++) begin
        s = j * 16 + k;
        if (s < slots) begin
          fr = s / cur_frame;
          u  = key_unit(s / 2);
          if (fr == dropped_frame) e[2*k +: 2] = 2'b11;
          else e[2*k +: 2] = ((s % 2 != 0) ? u[1] : u[0]) ? 2'b10 : 2'b01;
        end
      end
    end
    return e;
  endfunction

  // ---------------- transmitter "DMA": fill and refill ----------------
  int unsigned key_pos;           // next key word to load
  logic        a_first_half;
  logic        alice_busy = 1'b0;
  int          alice_irqs = 0;
  logic        refill_enable = 1'b1;

  task automatic alice_write(int unsigned word_addr, logic [31:0] data);
    @(posedge clk_alice); #1;
    a_en = 1'b1; a_we = 1'b1; a_addr = AW'(word_addr * 4); a_din = data;
    @(posedge clk_alice); #1;
    a_en = 1'b0; a_we = 1'b0;
  endtask

  task automatic alice_fill_all();
    @(posedge clk_alice); #1;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      a_en = 1'b1; a_we = 1'b1; a_addr = AW'(i * 4); a_din = key_word(i);
      @(posedge clk_alice); #1;
    end
    a_en = 1'b0; a_we = 1'b0;
    key_pos = DEPTH; a_first_half = 1'b1;
  endtask

  always @(posedge alice_interrupt) begin
    alice_irqs++;
    if (refill_enable) begin
      alice_busy = 1'b1;
      @(posedge clk_alice); #1;
      for (int unsigned i = 0; i < HALF; i++) begin
        a_en = 1'b1; a_we = 1'b1;
        a_addr = AW'(((a_first_half ? 0 : HALF) + i) * 4);
        a_din = key_word(key_pos + i);
        @(posedge clk_alice); #1;
      end
      a_en = 1'b0; a_we = 1'b0;
      key_pos += HALF;
      a_first_half = ~a_first_half;
      alice_busy = 1'b0;
    end
  end

  // ---------------- receiver "DMA": drain and compare ----------------
  int unsigned words_read;
  logic        bob_busy = 1'b0;
  int          bob_irqs = 0;
  int          word_errors = 0;

  task automatic bob_read_words(int unsigned n);
    logic [31:0] exp_w;
    @(posedge clk_bob); #1;
    for (int unsigned i = 0; i < n; i++) begin
      b_en = 1'b1; b_addr = AW'(((words_read + i) % DEPTH) * 4);
      @(posedge clk_bob); #1;
      exp_w = expected_word(words_read + i);
      checks++;
      if (b_dout !== exp_w) begin
        failures++; word_errors++;
        if (word_errors < 10)
          $display("ERROR rx word %0d: got %h expected %h", words_read + i, b_dout, exp_w);
      end
    end
    b_en = 1'b0;
    words_read += n;
  endtask

  always @(posedge bob_interrupt) begin
    bob_irqs++;
    bob_busy = 1'b1;
    bob_read_words(HALF);
    bob_busy = 1'b0;
  end

  // ---------------- mechanism counters ----------------
  int n_frames = 0, n_missed = 0, n_laser_start = 0, n_ext_start = 0;
  int n_bb84 = 0, n_b92 = 0, n_full_duty = 0, n_tangled = 0, n_pointing = 0;
  int n_empty = 0, n_full = 0, n_long_frame = 0, n_slow = 0, n_short_pulse = 0;
  always @(posedge bob_missed) n_missed++;
  always @(posedge dut.u_bob.u_hermes_sync.sync_start) n_frames++;

  // ---------------- helpers ----------------
  task automatic reset_both();
    alice_sw_rst = 1'b1; bob_sw_rst = 1'b1;
    alice_start_req = 1'b0; bob_external_start = 1'b0;
    repeat (5) @(posedge clk_alice);
    alice_sw_rst = 1'b0; bob_sw_rst = 1'b0;
    repeat (5) @(posedge clk_alice);
    #1;
  endtask

  task automatic set_params(protocol_e pr, start_type_e st, int unsigned period,
                            int unsigned duty, int unsigned frame, int unsigned units);
    ap.laser_duty = duty;        ap.laser_period = period;
    ap.start_duty = 10;          ap.start_period = 20;
    ap.count_before_laser = 5;   ap.sync_width = 5;
    ap.frame_size = frame;       ap.data_depth = units;
    ap.interrupt_time = 100;     ap.protocol = pr;  ap.start_type = st;
    bp.laser_duty = duty;        bp.laser_period = period;
    bp.start_duty = 10;          bp.start_period = 20;
    bp.count_before_laser = 5;   bp.sync_width = 5;
    bp.frame_size = frame;       bp.data_depth = units;
    bp.interrupt_time = 100;     bp.delay_before_sync = 50;
    bp.protocol = pr;            bp.start_type = st;
    cur_proto = pr; cur_units = units; cur_frame = frame;
  endtask

  // run one key transmission and check everything the receiver stored
  task automatic run_key(protocol_e pr, start_type_e st, int unsigned period,
                         int unsigned duty, int unsigned frame, int unsigned units,
                         int unsigned drop_frame);
    int unsigned total_words, irq_before;
    set_params(pr, st, period, duty, frame, units);
    reset_both();
    dropped_frame = drop_frame;
    sync_edges = 0;
    // drop_frame all-ones: no pulse is lost
    drop_edge  = (drop_frame == 32'hFFFF_FFFF) ? drop_frame :
                 (st == START_LASER) ? 3 + drop_frame + 1 : drop_frame + 1;
    words_read = 0;
    alice_fill_all();
    if (st == START_EXTERNAL) begin
      // the start travels over the network to the receiver, which answers
      bob_external_start = 1'b1;
      @(posedge bob_start_red);
      n_ext_start++;
      repeat (3) @(posedge clk_alice); #1;
    end
    alice_start_req = 1'b1;
    if (st == START_LASER) begin
      @(posedge dut.u_bob.u_hermes_sync.start_key);
      n_laser_start++;
    end
    wait (bob_full === 1'b1);
    n_full++;
    wait (alice_empty === 1'b1);
    n_empty++;
    repeat (20) @(posedge clk_bob);
    wait (bob_busy === 1'b0);
    total_words = (units * 4 + 31) / 32;   // 4 receiver bits per key unit
    checks++;
    if (words_read > total_words) begin
      failures++;
      $display("ERROR read %0d words, key has only %0d", words_read, total_words);
    end else begin
      bob_read_words(total_words - words_read);
    end
    if (pr == PROTO_BB84) n_bb84++; else n_b92++;
    if (duty >= period) n_full_duty++;
    checks++;
    if (alice_tangled) begin
      failures++; $display("ERROR unexpected tangled alarm");
    end
    alice_start_req = 1'b0; bob_external_start = 1'b0;
  endtask

  // ---------------- stimulus ----------------
  int unsigned t0;
  int unsigned rises, high_cycles;
  initial begin
    set_params(PROTO_BB84, START_LASER, 10, 5, 1000, 100);
    dropped_frame = 32'hFFFF_FFFF;

    // 1: BB84, laser start, long key wrapping both RAMs, one sync lost
    run_key(PROTO_BB84, START_LASER, 10, 5, 1000, 140000, 3);
    $display("scenario 1 done: %0d words checked, %0d/%0d interrupts (tx/rx)",
             words_read, alice_irqs, bob_irqs);
    checks++;
    if (alice_irqs < 2 || bob_irqs < 4) begin
      failures++; $display("ERROR too few RAM interrupts");
    end

    // 2: B92, external start, 100 % duty, one sync lost
    run_key(PROTO_B92, START_EXTERNAL, 4, 4, 50, 3000, 5);
    $display("scenario 2 done: %0d words checked", words_read);

    // 5: the longest error-free frame: 200000 qubits at 10 MHz (20 ms per
    // frame), boards 0.5 ppm apart (5 ns per 10 ms)
    bob_half = 5.0 * (1.0 + 0.5e-6);
    run_key(PROTO_BB84, START_LASER, 10, 5, 200000, 400000, 32'hFFFF_FFFF);
    $display("scenario 5 done: %0d words checked", words_read);
    n_long_frame++;

    // 6: slowest qubit rate, 10 kHz (10000-cycle slots) at 20 % duty
    bob_half = 5.0 * (1.0 + 4.0e-6);
    run_key(PROTO_BB84, START_LASER, 10000, 2000, 10, 200, 32'hFFFF_FFFF);
    $display("scenario 6 done: %0d words checked", words_read);
    n_slow++;

    // 7: shortest pulse tested, 20 % duty at 10 MHz (2 of 10 cycles, a
    // 1-cycle receiver window), with the smallest frame, 10 qubits
    run_key(PROTO_BB84, START_LASER, 10, 2, 10, 20000, 32'hFFFF_FFFF);
    $display("scenario 7 done: %0d words checked", words_read);
    n_short_pulse++;

    // 3: late refill -> tangled alarm
    set_params(PROTO_BB84, START_LASER, 2, 1, 100000, 200000);
    bp.start_type = START_EXTERNAL;   // the receiver stays out of this one
    reset_both();
    alice_fill_all();
    refill_enable = 1'b0;
    alice_start_req = 1'b1;
    // the bus is still writing the half that is about to be read
    @(posedge alice_interrupt);
    @(posedge clk_alice); #1;
    a_en = 1'b1; a_we = 1'b1; a_addr = '0; a_din = 32'hDEAD_BEEF;
    wait (alice_tangled === 1'b1);
    a_en = 1'b0; a_we = 1'b0;
    n_tangled++;
    repeat (100) @(posedge clk_alice);
    checks++;
    if (alice_lasers != 0 || alice_empty) begin
      failures++; $display("ERROR transmitter did not stop on tangled alarm");
    end
    // a new start is ignored while the alarm is up
    alice_start_req = 1'b0; repeat (5) @(posedge clk_alice);
    alice_start_req = 1'b1; repeat (500) @(posedge clk_alice);
    checks++;
    if (!alice_tangled || alice_lasers != 0) begin
      failures++; $display("ERROR start accepted during tangled alarm");
    end
    refill_enable = 1'b1;
    reset_both();
    checks++;
    if (alice_tangled) begin failures++; $display("ERROR alarm survived reset"); end

    // 4: pointing mode, period 8, duty 3, lasers 0 and 2, sync laser on
    set_params(PROTO_BB84, START_LASER, 8, 3, 10, 10);
    sw_lasers = 4'b0101; sw_sync = 1'b1; sw_pointing_en = 1'b1;
    repeat (20) @(posedge clk_alice);
    rises = 0; high_cycles = 0;
    for (int i = 0; i < 80; i++) begin
      @(posedge clk_alice); #1;
      if (alice_lasers[0]) high_cycles++;
      checks++;
      if (alice_lasers[1] || alice_lasers[3] || alice_lasers[0] != alice_lasers[2] ||
          !alice_laser_sync) begin
        failures++; $display("ERROR pointing outputs %b sync %b", alice_lasers, alice_laser_sync);
      end
    end
    checks++;
    if (high_cycles != 30) begin
      failures++; $display("ERROR pointing duty: %0d high cycles of 80, expected 30", high_cycles);
    end else n_pointing++;
    sw_pointing_en = 1'b0;
    repeat (3) @(posedge clk_alice); #1;
    checks++;
    if (alice_lasers != 0 || alice_laser_sync) begin
      failures++; $display("ERROR pointing outputs stay on after disable");
    end

    // every mechanism must have occurred
    $display("frames %0d, missed syncs %0d, laser starts %0d, external starts %0d",
             n_frames, n_missed, n_laser_start, n_ext_start);
    $display("BB84 runs %0d, B92 runs %0d, 100%% duty runs %0d, tangled %0d, pointing %0d",
             n_bb84, n_b92, n_full_duty, n_tangled, n_pointing);
    $display("tx interrupts %0d, rx interrupts %0d, empty %0d, full %0d",
             alice_irqs, bob_irqs, n_empty, n_full);
    checks++; if (n_frames < 2)      begin failures++; $display("ERROR no frames"); end
    checks++; if (n_missed != 2)     begin failures++; $display("ERROR missed syncs %0d, expected 2", n_missed); end
    checks++; if (n_laser_start < 1) begin failures++; $display("ERROR no laser start"); end
    checks++; if (n_ext_start < 1)   begin failures++; $display("ERROR no external start"); end
    checks++; if (n_bb84 < 1 || n_b92 < 1) begin failures++; $display("ERROR protocol not exercised"); end
    checks++; if (n_full_duty < 1)   begin failures++; $display("ERROR no 100%% duty run"); end
    checks++; if (n_tangled < 1)     begin failures++; $display("ERROR no tangled alarm"); end
    checks++; if (n_pointing < 1)    begin failures++; $display("ERROR no pointing"); end
    checks++; if (n_long_frame < 1 || n_slow < 1 || n_short_pulse < 1) begin failures++; $display("ERROR rate/frame extremes not run"); end
    checks++; if (alice_irqs < 1 || bob_irqs < 1) begin failures++; $display("ERROR no interrupts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20_000_000) @(posedge clk_alice);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
