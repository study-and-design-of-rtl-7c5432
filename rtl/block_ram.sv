// block_ram: true dual-port block RAM holding the key (Alice) or the received
// detector words (Bob).
//
// Two independent read/write ports share one array of DEPTH words of WIDTH
// bits (8192 x 32 bits by default, the configuration of the board's block
// memory). Port A belongs to the key reader / word composer, port B to the
// bus-side BRAM controller that the DMA engine uses to refill or drain one
// half of the memory while the other half is in use. Both ports work on the
// one board clock.
//
// Timing: a port with en high reads the addressed word into dout at the clock
// edge (one cycle of latency, read-before-write); with en and we high it
// writes din. A port with en low keeps dout. If both ports write one address
// in the same cycle, port B wins.
module block_ram #(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              ena,
  input  logic              wea,
  input  logic [ADDR_W-1:0] addra,
  input  logic [WIDTH-1:0]  dina,
  output logic [WIDTH-1:0]  douta,
  input  logic              enb,
  input  logic              web,
  input  logic [ADDR_W-1:0] addrb,
  input  logic [WIDTH-1:0]  dinb,
  output logic [WIDTH-1:0]  doutb
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ena) begin
      douta <= mem[addra];
      if (wea) mem[addra] <= dina;
    end
    if (enb) begin
      doutb <= mem[addrb];
      if (web) mem[addrb] <= dinb;
    end
  end
endmodule
