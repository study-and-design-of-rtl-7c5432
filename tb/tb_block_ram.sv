// tb_block_ram: checks the true dual-port key memory at its full size
// (8192 words of 32 bits).
//
// A reference array mirrors every write. Random reads and writes on both
// ports are compared with it; each read must return its data exactly one
// clock after the address (one-cycle latency), a write must return the old
// word on the same port (read-before-write), a disabled port must hold its
// output, and a same-address write on both ports must leave port B's data.
// The whole memory is also written through port B and read back through
// port A, as the processor and the fabric do.
module tb_block_ram;
  localparam int DEPTH = 8192;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        ena = 0, wea = 0, enb = 0, web = 0;
  logic [12:0] addra = 0, addrb = 0;
  logic [31:0] dina = 0, dinb = 0, douta, doutb;

  block_ram dut (.clk, .ena, .wea, .addra, .dina, .douta,
                 .enb, .web, .addrb, .dinb, .doutb);

  logic [31:0] ref_mem [DEPTH];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s", msg); end
  endtask

  initial begin
    // fill through port B, read back through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      enb = 1; web = 1; addrb = 13'(i); dinb = $urandom; ref_mem[i] = dinb;
    end
    @(negedge clk) enb = 0; web = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk) ena = 1; addra = 13'(i);
      @(negedge clk) ena = 0;
      check(douta == ref_mem[i], $sformatf("read A[%0d]=%h expected %h", i, douta, ref_mem[i]));
    end
    // random mixed traffic
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] exp_a, exp_b, hold_a, hold_b;
      logic        ea, eb, wa, wb;
      logic [12:0] aa, ab;
      @(negedge clk);
      hold_a = douta; hold_b = doutb;
      ea = 1'($urandom); eb = 1'($urandom); wa = 1'($urandom); wb = 1'($urandom);
      aa = 13'($urandom); ab = ($urandom_range(0, 7) == 0) ? aa : 13'($urandom);
      ena = ea; enb = eb; wea = wa; web = wb; addra = aa; addrb = ab;
      dina = $urandom; dinb = $urandom;
      exp_a = ref_mem[aa]; exp_b = ref_mem[ab];
      if (ea && wa) ref_mem[aa] = dina;
      if (eb && wb) ref_mem[ab] = dinb;
      @(negedge clk);
      ena = 0; enb = 0;
      check(douta == (ea ? exp_a : hold_a), $sformatf("port A out %h expected %h", douta, ea ? exp_a : hold_a));
      check(doutb == (eb ? exp_b : hold_b), $sformatf("port B out %h expected %h", doutb, eb ? exp_b : hold_b));
    end
    // everything written must still be there
    for (int i = 0; i < DEPTH; i += 7) begin
      @(negedge clk) enb = 1; web = 0; addrb = 13'(i);
      @(negedge clk) enb = 0;
      check(doutb == ref_mem[i], $sformatf("final B[%0d]=%h expected %h", i, doutb, ref_mem[i]));
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
