// start_key_watchman: turns a software start request into a short start pulse.
//
// The start request comes from a software-written register, so it stays high
// for an unpredictable, usually very long, time. Every FSM that waits for
// start_key must see exactly one start per request, so this block detects the
// rising edge of start_req and answers with a start_key pulse that is exactly
// PULSE_CYCLES clock cycles long ("a couple of clock cycles"). A new pulse
// needs start_req to fall and rise again.
//
// Timing: start_key goes high in the cycle after the first cycle in which
// start_req is seen high, and stays high PULSE_CYCLES cycles.
// Reset: active-low asynchronous; a request already high when reset ends
// does not start a transmission (it must be released first).
// Bob's start key manager is another instance of this block.
module start_key_watchman #(
  parameter int unsigned PULSE_CYCLES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_req,   // level from software
  output logic start_key    // PULSE_CYCLES-cycle pulse
);
  localparam int unsigned CW = $clog2(PULSE_CYCLES + 1);

  logic          req_q;
  logic [CW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q     <= 1'b1;    // treat a request held through reset as old
      remaining <= '0;
      start_key <= 1'b0;
    end else begin
      req_q <= start_req;
      if (start_req && !req_q) begin
        remaining <= CW'(PULSE_CYCLES - 1);
        start_key <= 1'b1;
      end else if (remaining != '0) begin
        remaining <= remaining - 1'b1;
        start_key <= 1'b1;
      end else begin
        start_key <= 1'b0;
      end
    end
  end
endmodule
