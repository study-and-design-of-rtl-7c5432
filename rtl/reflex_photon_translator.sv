// reflex_photon_translator: brings single-photon-detector clicks into the
// receiver's clock domain.
//
// A detector click comes from the transmitter's time domain and may be
// shorter than one receiver clock period, so it cannot simply be sampled.
// Each channel has a flip-flop that the gated click (spd & reflex_enable)
// sets asynchronously: the output rises together with the click. The
// flip-flop is cleared on the second rising clock edge after it was set (or,
// if the gated click is still high then, on the first edge after the click
// ends), so every accepted click gives an output at least one full clock
// period long, which the slot logic samples safely. While reflex_enable is
// low, clicks (dark counts outside the reading window) are ignored.
//
// Interface: spd[i] asynchronous detector inputs, reflex_out[i] stretched
// outputs, reflex_enable the reading window from the slot controller.
// Reset: active-low, synchronous (the click is the flip-flop's only
// asynchronous control; synthesis accepts one per flip-flop). The board reset
// is asynchronous elsewhere, so lint reports the reset net as used both
// synchronously and asynchronously (SYNCASYNCNET); that is intended: the
// reset is released synchronously, so either use is safe.
// The outputs are not synchronised further
// (as in the reference design); the slot logic only ORs them into a word.
module reflex_photon_translator #(
  parameter int unsigned CHANNELS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                reflex_enable,
  input  logic [CHANNELS-1:0] spd,
  output logic [CHANNELS-1:0] reflex_out
);
  for (genvar i = 0; i < CHANNELS; i++) begin : g_ch
    logic set_click;
    logic held;
    logic aged;   // held has been seen by one clock edge already

    assign set_click = spd[i] & reflex_enable;

    always_ff @(posedge clk or posedge set_click) begin
      if (set_click)            held <= 1'b1;
      else if (!rst_n)          held <= 1'b0;
      else if (held && aged)    held <= 1'b0;
    end

    // toggles while held: set at the first edge that sees the click, so the
    // second edge clears held and aged together, and a click arriving right
    // after that again gets two edges
    always_ff @(posedge clk) begin
      if (!rst_n || !held) aged <= 1'b0;
      else                 aged <= !aged;
    end

    assign reflex_out[i] = held;
  end
endmodule
