// hermes_sync: receiver-side synchronisation.
//
// It decodes the start of a transmission and turns every frame's sync laser
// pulse into a sync_start for the slot controller. The sync laser input comes
// from the other board's clock domain; it is sampled by a two-flip-flop
// synchroniser and its rising edges are detected. One-process Moore FSM:
//   IDLE           - start-with-laser mode: the first rising edge moves to
//                    DECODING_START. Start-with-external-channel mode: the
//                    sync laser is ignored; external_start (software, after
//                    the start was agreed over the network) moves straight to
//                    SYNC_SEND, acknowledged by a start_red pulse.
//   DECODING_START - counts the start impulses. After the third rising edge
//                    the start key manager issues start_key and the FSM moves
//                    to SYNC_SEND. If the next impulse does not come within
//                    two start periods the edge was noise: back to IDLE.
//   SYNC_SEND      - every rising edge of the sync laser arms a counter; after
//                    delay_before_sync cycles sync_start is pulsed. The delay
//                    absorbs the different delays of the sync detector and
//                    the qubit detectors (ideally the transmitter's 500 ns).
//                    full (key stored) returns the FSM to IDLE.
// The start key manager is a start_key_watchman instance, as on the
// transmitter, so start_key is a pulse of a couple of cycles.
//
// Timing: sync_start is high delay_before_sync + 1 cycles after the first
// clock edge that sees the sync laser high (delay_before_sync >= 2; the
// synchroniser's cycle is counted as part of the delay). With this, a
// delay_before_sync equal to the transmitter's 500 ns puts the first reading
// window on the first cycle of the first laser pulse of the frame. start_key follows the third start edge by 2 cycles.
// The synchroniser, the noise timeout and start_red are this design's choices.
module hermes_sync
  import quake_pkg::*;
#(
  parameter int unsigned START_IMPULSES = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sync_laser,        // asynchronous detector
  input  logic               external_start,    // software, level
  input  start_type_e        start_type,
  input  logic [PARAM_W-1:0] start_period,
  input  logic [PARAM_W-1:0] delay_before_sync,
  input  logic               full,
  output logic               start_key,
  output logic               start_red,         // external start taken
  output logic               sync_start
);
  typedef enum logic [1:0] {H_IDLE, H_DECODING_START, H_SYNC_SEND} state_e;

  state_e             state;
  logic [2:0]         sync_ff;     // two synchroniser stages + edge history
  logic               rise;
  logic [7:0]         impulses;
  logic [PARAM_W-1:0] t;
  logic               armed;
  logic [PARAM_W-1:0] dly;
  logic               start_go;
  logic               ext_q;

  assign rise = sync_ff[1] & ~sync_ff[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_ff <= '0;
    else        sync_ff <= {sync_ff[1:0], sync_laser};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= H_IDLE;
      impulses   <= '0;
      t          <= '0;
      armed      <= 1'b0;
      dly        <= '0;
      start_go   <= 1'b0;
      start_red  <= 1'b0;
      sync_start <= 1'b0;
      ext_q      <= 1'b1;
    end else begin
      sync_start <= 1'b0;
      start_red  <= 1'b0;
      ext_q      <= external_start;
      unique case (state)
        H_IDLE: begin
          start_go <= 1'b0;
          armed    <= 1'b0;
          impulses <= '0;
          t        <= '0;
          if (start_type == START_EXTERNAL) begin
            if (external_start && !ext_q) begin
              start_go  <= 1'b1;
              start_red <= 1'b1;
              state     <= H_SYNC_SEND;
            end
          end else if (rise) begin
            impulses <= 8'd1;
            state    <= H_DECODING_START;
          end
        end
        H_DECODING_START: begin
          t <= t + 1;
          if (rise) begin
            t        <= '0;
            impulses <= impulses + 1'b1;
            if (32'(impulses) + 1 >= START_IMPULSES) begin
              start_go <= 1'b1;
              state    <= H_SYNC_SEND;
            end
          end else if (t > (start_period << 1)) begin
            state <= H_IDLE;
          end
        end
        H_SYNC_SEND: begin
          if (full) begin
            start_go <= 1'b0;
            armed    <= 1'b0;
            state    <= H_IDLE;
          end else if (armed) begin
            if (dly >= delay_before_sync) begin
              sync_start <= 1'b1;
              armed      <= 1'b0;
            end else begin
              dly <= dly + 1;
            end
          end else if (rise) begin
            armed <= 1'b1;
            dly   <= PARAM_W'(2);   // the synchroniser already took a cycle
          end
        end
        default: state <= H_IDLE;
      endcase
    end
  end

  // start key manager: one short start_key per start decision
  start_key_watchman #(.PULSE_CYCLES(2)) u_start_key_manager (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_req (start_go),
    .start_key (start_key)
  );
endmodule
