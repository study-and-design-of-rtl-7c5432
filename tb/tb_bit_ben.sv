// tb_bit_ben: checks the receiver's key writer.
//
// The writer is built with a 16-word memory (half = 8 words) so that the
// ring buffer wraps several times. The testbench feeds slot words with
// new_data at random spacing: 4-bit detector patterns in BB84 (8 slots per
// 32-bit word) and, in B92, patterns whose bits 2 and 0 carry the result
// (16 slots per word). A behavioural "DMA" reads the half that was just
// written on every interrupt and compares it with a reference model; after
// full it reads the rest. It checks the word contents, the interrupt count
// and length (interrupt_time cycles), that full rises after
// 4 * data_depth bits and that a partial last word is zero-padded.
module tb_bit_ben;
  import quake_pkg::*;
  localparam int DEPTH = 16, HALF = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start_key = 0, new_data = 0;
  protocol_e protocol = PROTO_BB84;
  logic [3:0]  data_in = 0;
  logic [31:0] data_depth, interrupt_time = 15;
  logic [5:0]  bram_addr;
  logic [31:0] bram_din, b_dout;
  logic        bram_en, bram_we, interrupt_out, full;
  logic        b_en = 0;
  logic [3:0]  b_addr = 0;
  always #5 clk = ~clk;

  bit_ben #(.BRAM_DEPTH(DEPTH)) dut (.clk, .rst_n, .start_key, .protocol, .new_data, .data_in,
    .data_depth, .interrupt_time, .bram_addr, .bram_din, .bram_en, .bram_we, .interrupt_out, .full);

  block_ram #(.DEPTH(DEPTH)) u_ram (.clk, .ena(bram_en), .wea(bram_we), .addra(bram_addr[5:2]),
    .dina(bram_din), .douta(), .enb(b_en), .web(1'b0), .addrb(b_addr), .dinb('0), .doutb(b_dout));

  int cyc = 0;
  always @(posedge clk) cyc++;
  int irq_len [$];
  logic irq_p = 0;
  always @(negedge clk) begin
    if (interrupt_out && !irq_p) irq_len.push_back(1);
    else if (interrupt_out) irq_len[irq_len.size()-1]++;
    irq_p = interrupt_out;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  logic [31:0] ref_w [$];
  int unsigned words_read, errs;
  bit draining = 0;

  task automatic read_words(int unsigned n);
    for (int unsigned i = 0; i < n; i++) begin
      @(negedge clk) b_en = 1; b_addr = 4'((words_read + i) % DEPTH);
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
    draining = 1;
    read_words(HALF);
    draining = 0;
  end

  task automatic run(protocol_e pr, int unsigned depth_units);
    int unsigned nbits, per_slot, slots, fill;
    logic [31:0] w;
    protocol = pr; data_depth = depth_units;
    rst_n = 0; @(negedge clk) rst_n = 1;
    ref_w.delete(); irq_len.delete(); words_read = 0; errs = 0;
    per_slot = (pr == PROTO_BB84) ? 4 : 2;
    nbits = 4 * depth_units;
    slots = (nbits + per_slot - 1) / per_slot;
    @(negedge clk) start_key = 1; @(negedge clk) start_key = 0;
    repeat (3) @(negedge clk);
    w = 0; fill = 0;
    for (int unsigned s = 0; s < slots; s++) begin
      data_in = 4'($urandom);
      if (pr == PROTO_BB84) w[fill +: 4] = data_in;
      else                  w[fill +: 2] = {data_in[2], data_in[0]};
      fill += per_slot;
      if (fill == 32) begin ref_w.push_back(w); w = 0; fill = 0; end
      check(!full, "full before the last slot");
      new_data = 1; @(negedge clk); new_data = 0;
      repeat (1 + $urandom_range(0, 4)) @(negedge clk);
    end
    if (fill != 0) ref_w.push_back(w);
    repeat (5) @(negedge clk);
    check(full, "full not raised after 4 * data_depth bits");
    wait (!draining);
    read_words(ref_w.size() - words_read);
    check(irq_len.size() == ref_w.size() / HALF,
          $sformatf("%0d interrupts, expected %0d", irq_len.size(), ref_w.size() / HALF));
    foreach (irq_len[i])
      check(irq_len[i] == 15, $sformatf("interrupt %0d lasted %0d cycles", i, irq_len[i]));
    // nothing is written after full
    new_data = 1; @(negedge clk); new_data = 0;
    repeat (3) @(negedge clk);
    check(dut.state == 0, "writer still running after full");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(PROTO_BB84, 96);                                // 48 words, wraps 3 times
    run(PROTO_BB84, 161);                               // partial last word
    run(PROTO_B92, 128);
    run(PROTO_B92, 37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
