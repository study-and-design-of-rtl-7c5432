// clock_drift_counter: measures a board oscillator against a laboratory
// oscilloscope.
//
// The counter repeatedly counts a fixed number of clock cycles chosen by two
// switches: 1e6 (10 ms at 100 MHz), 1e8 (1 s) or 1e9 (10 s). A one-cycle go
// pulse marks the start of each count and a one-cycle stop pulse its end; the
// next go follows the stop immediately. The time an oscilloscope measures
// between go and the matching stop, compared with the nominal value, gives
// the oscillator's drift.
//
// Timing: go is high in the first cycle of a count, stop in cycle N of it,
// so go-to-stop is N cycles and one measurement lasts N+1 cycles.
// sel: 0 -> COUNT_SHORT, 1 -> COUNT_MEDIUM, 2 or 3 -> COUNT_LONG. A change of
// sel takes effect at the next go.
module clock_drift_counter #(
  parameter int unsigned COUNT_SHORT  = 1_000_000,
  parameter int unsigned COUNT_MEDIUM = 100_000_000,
  parameter int unsigned COUNT_LONG   = 1_000_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] sel,
  output logic       go,
  output logic       stop
);
  logic [31:0] cnt;
  logic [31:0] target;
  logic        running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      target  <= '0;
      running <= 1'b0;
      go      <= 1'b0;
      stop    <= 1'b0;
    end else begin
      go   <= 1'b0;
      stop <= 1'b0;
      if (!running) begin
        unique case (sel)
          2'd0:    target <= COUNT_SHORT;
          2'd1:    target <= COUNT_MEDIUM;
          default: target <= COUNT_LONG;
        endcase
        cnt     <= 32'd1;
        running <= 1'b1;
        go      <= 1'b1;
      end else if (cnt == target) begin
        running <= 1'b0;
        stop    <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
