// tb_bob_top: checks the receiver board logic on its own.
//
// The receive RAM is shrunk to 64 words through a parameter. The testbench
// acts as an ideal transmitter on the same clock: three start impulses on
// the sync detector, then per frame a sync pulse and, 52 cycles later, one
// slot every laser_period cycles during which the detector pattern of the
// slot is held for laser_duty cycles (asynchronously, 3 ns after a falling
// edge). Patterns are random: no click, one click or several. One frame
// gets no sync pulse. A behavioural "DMA" drains the half just written on
// every interrupt and compares it with the expected words; the frame
// without sync must read as 1111 patterns. It also checks the missed_sync
// count, full after 4 * data_depth bits and that start_red stays low in
// laser-start mode.
module tb_bob_top;
  import quake_pkg::*;
  localparam int DEPTH = 64, HALF = 32, AW = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, btn_rst = 0, sw_rst = 0, external_start = 0;
  bob_params_t params;
  logic [3:0] spd = 0;
  logic       spd_sync = 0;
  logic       b_en = 0;
  logic [AW-1:0] b_addr = 0;
  logic [31:0]   b_dout;
  logic       interrupt_out, full, missed_sync, start_red;
  always #5 clk = ~clk;

  bob_top #(.BRAM_DEPTH(DEPTH), .DEBOUNCE_CYCLES(4)) dut (.clk, .btn_rst, .sw_rst,
    .external_start, .params, .spd, .spd_sync, .bram_b_en(b_en), .bram_b_we(1'b0),
    .bram_b_addr(b_addr), .bram_b_din('0), .bram_b_dout(b_dout), .interrupt_out, .full,
    .missed_sync, .start_red);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  int missed = 0, reds = 0;
  always @(posedge clk) begin
    if (missed_sync && !sw_rst) missed++;
    if (start_red && !sw_rst) reds++;
  end

  logic [31:0] ref_w [$];
  int unsigned words_read, errs;
  bit draining = 0;
  int irqs = 0;
  task automatic read_words(int unsigned n);
    for (int unsigned i = 0; i < n; i++) begin
      @(negedge clk) b_en = 1; b_addr = AW'(((words_read + i) % DEPTH) * 4);
      @(negedge clk) b_en = 0;
      checks++;
      if (b_dout !== ref_w[words_read + i]) begin
        failures++; errs++;
        if (errs < 8) $display("ERROR word %0d: %h expected %h", words_read + i, b_dout,
                               ref_w[words_read + i]);
      end
    end
    words_read += n;
  endtask
  always @(posedge interrupt_out) begin
    irqs++; draining = 1; read_words(HALF); draining = 0;
  end

  localparam int P = 8, D = 4, F = 64, UNITS = 1000, DROP = 4;
  initial begin
    int slots, fill;
    logic [31:0] w;
    params = '0;
    params.laser_duty = D; params.laser_period = P;
    params.start_duty = 10; params.start_period = 20;
    params.count_before_laser = 10; params.sync_width = 10;
    params.frame_size = F; params.data_depth = UNITS; params.interrupt_time = 40;
    params.delay_before_sync = 50;
    params.protocol = PROTO_BB84; params.start_type = START_LASER;
    #1 sw_rst = 1;             // power-up reset (needs an edge)
    repeat (4) @(negedge clk);
    sw_rst = 0;
    repeat (10) @(negedge clk);
    // start impulses
    repeat (3) begin
      #3 spd_sync = 1; repeat (10) @(negedge clk);
      #3 spd_sync = 0; repeat (10) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    slots = UNITS;            // BB84: one 4-bit word per slot
    w = 0; fill = 0;
    for (int s = 0; s < slots; s++) begin
      logic [3:0] v;
      int k;
      k = $urandom_range(0, 5);
      v = (k == 0) ? 4'b0 : (k == 5) ? 4'($urandom) : 4'b0001 << (k - 1);
      if (s % F == 0) begin
        // frame start: sync pulse (unless dropped), slots 52 cycles later
        if (s / F != DROP) begin #3 spd_sync = 1; end
        repeat (10) @(negedge clk);
        #3 spd_sync = 0;
        repeat (41) @(negedge clk);
      end
      if (s / F == DROP) v = 4'hF;
      w[4 * fill +: 4] = v;
      fill++;
      if (fill == 8) begin ref_w.push_back(w); w = 0; fill = 0; end
      if (s / F != DROP) begin #3 spd = v; end
      repeat (D) @(negedge clk);
      #3 spd = 0;
      repeat (P - D) @(negedge clk);
      if (s % F == F - 1) repeat (12) @(negedge clk);   // count_before_laser + 2
    end
    if (fill != 0) ref_w.push_back(w);
    repeat (200) @(negedge clk);
    check(full, "full not raised");
    wait (!draining);
    read_words(ref_w.size() - words_read);
    check(missed == 1, $sformatf("missed_sync %0d times, expected 1", missed));
    check(irqs == ref_w.size() / HALF, $sformatf("%0d interrupts", irqs));
    check(reds == 0, "start_red in laser-start mode");
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
