// tb_alice_top: checks the transmitter board logic on its own.
//
// The key RAM is shrunk to 64 words through a parameter so that a 3000-unit
// key wraps the ring buffer several times. A behavioural "DMA" fills the
// RAM through port B and refills the half just read on every interrupt.
// The testbench records the laser pins and checks:
//   - three start impulses on the sync laser (laser start), then one sync
//     pulse per frame of frame_size slots;
//   - the first laser of every frame rises 52 cycles after its sync pulse
//     (500 ns sync delay plus two register stages);
//   - every slot lights the laser of its key unit (BB84: channel
//     {basis, bit}) for laser_duty cycles, one slot per laser_period;
//   - empty rises at the end of the key and no tangled alarm is seen;
//   - with the pointing switch on, the selected lasers blink with the
//     configured duty cycle instead.
module tb_alice_top;
  import quake_pkg::*;
  localparam int DEPTH = 64, HALF = 32, AW = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, btn_rst = 0, sw_rst = 0, start_req = 0;
  alice_params_t params;
  logic       sw_pointing_en = 0, sw_sync = 0;
  logic [3:0] sw_lasers = 0, lasers;
  logic       b_en = 0, b_we = 0;
  logic [AW-1:0] b_addr = 0;
  logic [31:0]   b_din = 0, b_dout;
  logic       laser_sync, interrupt_out, tangled_alarm, empty;
  always #5 clk = ~clk;

  alice_top #(.BRAM_DEPTH(DEPTH), .DEBOUNCE_CYCLES(4)) dut (.clk, .btn_rst, .sw_rst, .start_req,
    .params, .sw_pointing_en, .sw_lasers, .sw_sync, .bram_b_en(b_en), .bram_b_we(b_we),
    .bram_b_addr(b_addr), .bram_b_din(b_din), .bram_b_dout(b_dout), .lasers, .laser_sync,
    .interrupt_out, .tangled_alarm, .empty);

  function automatic logic [31:0] key_word(int unsigned i);
    return (i * 32'h9E3779B1) ^ (i << 11) ^ 32'h3C3CA5A5;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  // laser and sync recorders
  logic [3:0] pval [$];
  int pstart [$], plen [$], sync_t [$], sync_len [$];
  logic [3:0] lp = 0;
  logic sp = 0;
  always @(negedge clk) begin
    if (lasers != 0 && lasers != lp) begin pval.push_back(lasers); pstart.push_back(cyc); plen.push_back(1); end
    else if (lasers != 0) plen[plen.size()-1]++;
    if (laser_sync && !sp) begin sync_t.push_back(cyc); sync_len.push_back(1); end
    else if (laser_sync) sync_len[sync_len.size()-1]++;
    lp = lasers; sp = laser_sync;
  end

  // DMA model
  int unsigned key_pos;
  bit first_half;
  int irqs = 0;
  always @(posedge interrupt_out) begin
    irqs++;
    @(negedge clk);
    for (int i = 0; i < HALF; i++) begin
      b_en = 1; b_we = 1; b_addr = AW'(((first_half ? 0 : HALF) + i) * 4);
      b_din = key_word(key_pos + i);
      @(negedge clk);
    end
    b_en = 0; b_we = 0;
    key_pos += HALF;
    first_half = !first_half;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  localparam int UNITS = 3000, P = 6, D = 3, F = 100;
  initial begin
    int errs, nf;
    params = '0;
    params.laser_duty = D; params.laser_period = P;
    params.start_duty = 8; params.start_period = 20;
    params.count_before_laser = 5; params.sync_width = 10;
    params.frame_size = F; params.data_depth = UNITS; params.interrupt_time = 40;
    params.protocol = PROTO_BB84; params.start_type = START_LASER;
    #1 sw_rst = 1;             // power-up reset (needs an edge)
    repeat (4) @(negedge clk);
    sw_rst = 0;
    repeat (4) @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_we = 1; b_addr = AW'(i * 4); b_din = key_word(i);
      @(negedge clk);
    end
    b_en = 0; b_we = 0;
    key_pos = DEPTH; first_half = 1;
    start_req = 1;
    wait (empty);
    repeat (100) @(negedge clk);
    start_req = 0;
    nf = (UNITS + F - 1) / F;
    check(sync_t.size() == 3 + nf, $sformatf("%0d sync-laser pulses, expected %0d", sync_t.size(), 3 + nf));
    for (int i = 0; i < 3 && i < sync_t.size(); i++) begin
      check(sync_len[i] == 8, "start impulse length");
      if (i > 0) check(sync_t[i] - sync_t[i-1] == 20, "start impulse spacing");
    end
    for (int i = 3; i < sync_t.size(); i++) check(sync_len[i] == 10, "sync pulse width");
    check(pval.size() == UNITS, $sformatf("%0d laser pulses, expected %0d", pval.size(), UNITS));
    errs = 0;
    for (int s = 0; s < pval.size() && s < UNITS; s++) begin
      logic [3:0] ev;
      ev = 4'b0001 << key_word(s / 16)[2 * (s % 16) +: 2];
      checks++;
      if (pval[s] !== ev || plen[s] != D) begin
        failures++; errs++;
        if (errs < 8) $display("ERROR slot %0d: %b for %0d cycles, expected %b for %0d",
                               s, pval[s], plen[s], ev, D);
      end
      if (s % F != 0) check(pstart[s] - pstart[s-1] == P, "slot period");
      else if (3 + s / F < sync_t.size())
        check(pstart[s] - sync_t[3 + s / F] == 52,
              $sformatf("frame %0d: laser %0d cycles after sync, expected 52", s / F,
                        pstart[s] - sync_t[3 + s / F]));
    end
    check(irqs >= 4, $sformatf("only %0d refill interrupts", irqs));
    check(!tangled_alarm, "tangled alarm in a clean run");
    // pointing mode
    params.laser_duty = 2; params.laser_period = 5;
    sw_lasers = 4'b1001; sw_sync = 1; sw_pointing_en = 1;
    repeat (20) @(negedge clk);
    begin
      int on0 = 0, on1 = 0, sy = 0;
      for (int c = 0; c < 100; c++) begin
        @(negedge clk);
        if (lasers[0]) on0++;
        if (lasers[1]) on1++;
        if (laser_sync) sy++;
      end
      check(on0 == 40 && on1 == 0 && sy == 100,
            $sformatf("pointing: laser0 %0d, laser1 %0d, sync %0d of 100 cycles", on0, on1, sy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
