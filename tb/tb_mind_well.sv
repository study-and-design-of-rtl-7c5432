// tb_mind_well: checks the transmitter's key reader.
//
// The reader is built with a 16-word memory (half = 8 words) so that the
// ring buffer wraps several times. A behavioural "DMA" fills the memory,
// and on every interrupt rewrites the half that was just finished with the
// next part of the key. The testbench consumes 2-bit key units with
// data_red pulses at random spacing and checks each unit against the key,
// checks that each interrupt lasts interrupt_time cycles and comes once per
// half, that empty rises after data_depth units, and that a port-B write
// that overlaps a half change raises the sticky tangled alarm and stops
// the reader (a new start_key is then refused).
module tb_mind_well;
  import quake_pkg::*;
  localparam int DEPTH = 16, HALF = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start_key = 0, data_red = 0;
  logic [31:0] data_depth, interrupt_time;
  logic [5:0]  bram_addr;
  logic        bram_en;
  logic [31:0] bram_dout;
  logic [1:0]  data_out;
  logic        empty, interrupt_out, tangled_alarm;
  always #5 clk = ~clk;

  mind_well #(.BRAM_DEPTH(DEPTH)) dut (.clk, .rst_n, .start_key, .data_red, .data_depth,
    .interrupt_time, .bram_addr, .bram_en, .bram_dout, .bram_b_we(b_en), .data_out, .empty,
    .interrupt_out, .tangled_alarm);

  // port B side of the memory, written by the testbench
  logic        b_en = 0;
  logic [3:0]  b_addr = 0;
  logic [31:0] b_din = 0, b_dout;
  block_ram #(.DEPTH(DEPTH)) u_ram (.clk, .ena(bram_en), .wea(1'b0), .addra(bram_addr[5:2]),
    .dina('0), .douta(bram_dout), .enb(b_en), .web(b_en), .addrb(b_addr), .dinb(b_din),
    .doutb(b_dout));

  function automatic logic [31:0] key_word(int unsigned i);
    return (i * 32'h9E3779B1) ^ (i << 7) ^ 32'h5A5A0F0F;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  int irq_t [$], irq_len [$];
  logic irq_p = 0;
  always @(negedge clk) begin
    if (interrupt_out && !irq_p) begin irq_t.push_back(cyc); irq_len.push_back(1); end
    else if (interrupt_out) irq_len[irq_len.size()-1]++;
    irq_p = interrupt_out;
  end

  int unsigned key_pos;
  bit first_half, refill_on = 1;
  always @(posedge interrupt_out) if (refill_on) begin
    @(negedge clk);
    for (int i = 0; i < HALF; i++) begin
      b_en = 1; b_addr = 4'((first_half ? 0 : HALF) + i); b_din = key_word(key_pos + i);
      @(negedge clk);
    end
    b_en = 0;
    key_pos += HALF;
    first_half = !first_half;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  task automatic fill();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk) b_en = 1; b_addr = 4'(i); b_din = key_word(i);
    end
    @(negedge clk) b_en = 0;
    key_pos = DEPTH; first_half = 1;
  endtask

  int unsigned errs;
  initial begin
    interrupt_time = 20;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // --- normal run: 5 passes over the ring minus a few units ---
    data_depth = 5 * DEPTH * 16 - 3;
    fill();
    @(negedge clk) start_key = 1; @(negedge clk) start_key = 0;
    repeat (5) @(negedge clk);
    errs = 0;
    for (int u = 0; u < data_depth; u++) begin
      logic [1:0] exp_u;
      exp_u = key_word(u / 16)[2 * (u % 16) +: 2];
      checks++;
      if (data_out !== exp_u || empty) begin
        failures++; errs++;
        if (errs < 10) $display("ERROR unit %0d: %b expected %b", u, data_out, exp_u);
      end
      data_red = 1; @(negedge clk); data_red = 0;
      repeat (1 + $urandom_range(0, 3)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(empty == 1'b1, "empty not raised after data_depth units");
    check(irq_t.size() == 9, $sformatf("%0d interrupts, expected 9", irq_t.size()));
    foreach (irq_len[i])
      check(irq_len[i] == 20, $sformatf("interrupt %0d lasted %0d cycles, expected 20", i, irq_len[i]));
    check(tangled_alarm == 1'b0, "tangled alarm in a clean run");

    // --- overlap: port B writing at the moment a half is finished ---
    refill_on = 0;
    fill();
    data_depth = 1000;
    @(negedge clk) start_key = 1; @(negedge clk) start_key = 0;
    repeat (5) @(negedge clk);
    b_en = 1; b_addr = 4'd15; b_din = key_word(15);   // DMA still busy
    for (int u = 0; u < 200 && !tangled_alarm; u++) begin
      data_red = 1; @(negedge clk); data_red = 0; @(negedge clk);
    end
    b_en = 0;
    check(tangled_alarm == 1'b1, "overlap did not raise the tangled alarm");
    check(dut.state == 0, "reader still running after the tangled alarm");
    @(negedge clk) start_key = 1; @(negedge clk) start_key = 0;
    repeat (3) @(negedge clk);
    check(dut.state == 0, "start key accepted while the alarm is set");
    rst_n = 0; @(negedge clk) rst_n = 1;
    check(tangled_alarm == 1'b0, "reset did not clear the alarm");
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
