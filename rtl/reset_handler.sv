// reset_handler: combines the software reset and the push-button reset into
// one reset for the whole board logic.
//
// The push button is synchronised with two flip-flops and debounced: its
// debounced level changes only after the synchronised input has been stable
// for DEBOUNCE_CYCLES cycles (1 ms at 100 MHz by default; the debounce time
// is this design's choice). The debounced button and the software reset are
// ORed into a reset request. The request clears a SYNC_STAGES-deep flip-flop
// chain asynchronously, so rst_n falls at once, and the chain refills with
// ones on the clock, so rst_n rises synchronously SYNC_STAGES cycles after the
// request is gone: asynchronous assertion, synchronous deassertion. The
// software reset also clears the button synchroniser and debouncer, so the
// block needs no power-up values (the processor resets the logic at boot).
// SYNC_STAGES must be at least 2.
//
// Interface: sw_rst is the software reset level (active high), btn_rst the
// raw button (active high). rst_n is the active-low board reset.
//
// Lint note: in the receiver the board reset also clears the click catcher
// synchronously (a flip-flop there already has the click as its
// asynchronous set), so lint reports rst_n as used both synchronously and
// asynchronously. Both uses are safe because the release is synchronous.
module reset_handler #(
  parameter int unsigned DEBOUNCE_CYCLES = 100_000,
  parameter int unsigned SYNC_STAGES     = 2
) (
  input  logic clk,
  input  logic sw_rst,
  input  logic btn_rst,
  output logic rst_n
);
  localparam int unsigned DW = $clog2(DEBOUNCE_CYCLES + 1);

  // The button synchroniser and debouncer cannot be cleared by the reset
  // they produce; the software reset clears them instead (the processor
  // issues one at boot), so they never need power-up values.
  logic [1:0]             btn_sync;
  logic                   btn_db;
  logic [DW-1:0]          db_cnt;
  logic [SYNC_STAGES-2:0] chain;     // first stages of the release chain
  logic                   rst_q;     // last stage, drives rst_n
  logic                   rst_req;

  always_ff @(posedge clk) begin
    if (sw_rst) begin
      btn_sync <= '0;
      btn_db   <= 1'b0;
      db_cnt   <= '0;
    end else begin
      btn_sync <= {btn_sync[0], btn_rst};
      if (btn_sync[1] == btn_db) begin
        db_cnt <= '0;
      end else if (db_cnt >= DW'(DEBOUNCE_CYCLES - 1)) begin
        db_cnt <= '0;
        btn_db <= btn_sync[1];
      end else begin
        db_cnt <= db_cnt + 1'b1;
      end
    end
  end

  assign rst_req = sw_rst | btn_db;

  // asynchronous assertion, synchronous release
  always_ff @(posedge clk or posedge rst_req) begin
    if (rst_req) begin
      chain <= '0;
      rst_q <= 1'b0;
    end else begin
      chain <= (chain << 1) | (SYNC_STAGES-1)'(1);
      rst_q <= chain[SYNC_STAGES-2];
    end
  end

  assign rst_n = rst_q;
endmodule
