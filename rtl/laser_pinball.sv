// laser_pinball: slot and frame controller of the receiver.
//
// It is the only block that knows slots and frames. One-process Moore FSM:
//   IDLE         - start_key moves to SYNC.
//   SYNC         - waits for sync_start from the synchronisation module.
//                  From the second frame on, a watchdog counts the cycles
//                  since SYNC was entered; if sync_start has not come
//                  SYNC_EXTRA_CYCLES (50 ns) after the expected moment
//                  (count_before_laser + delay_before_sync + SYNC_LATENCY
//                  cycles) the sync pulse is taken as lost -> MISSED_SYNC.
//   SLOT_READING - each slot lasts laser_period cycles. reflex_enable, the
//                  detector window, is high for the first laser_duty-1 cycles
//                  (one cycle less than the transmitter's laser, to read only
//                  where a photon can fall in a whole clock period). Clicks
//                  are ORed into a 4-bit accumulator; in the last cycle of the
//                  slot the accumulator goes to data_out with a new_data
//                  pulse (several clicks in one slot give several ones).
//                  After frame_size slots -> SYNC, or IDLE once full.
//   MISSED_SYNC  - emergency frame: for every slot of the lost frame a 1111
//                  word is delivered, on the slot grid the frame would have
//                  had, so the stored key keeps its alignment and the frame
//                  is simply marked as bad. The FSM then returns to SYNC at
//                  the moment the real frame would have ended, which makes
//                  up for the 50 ns spent waiting.
// The protocol is not known here: all four channels are always collected.
//
// Timing: sync_start -> first reading cycle 1 cycle; new_data is a one-cycle
// pulse each laser_period cycles, data_out is valid with it. laser_period
// below 2 is treated as 2. The first frame after start_key has no watchdog
// (its sync time is not known). SYNC_LATENCY is the fixed pipeline delay of
// the two boards' logic between the end of a frame and sync_start; it is this
// design's own figure, as is the catch-up rule of MISSED_SYNC for slots
// shorter than the 50 ns wait.
module laser_pinball
  import quake_pkg::*;
#(
  parameter int unsigned SYNC_EXTRA_CYCLES = 5,   // 50 ns at 100 MHz
  parameter int unsigned SYNC_LATENCY      = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start_key,
  input  logic                        sync_start,
  input  logic                        full,
  input  logic [PARAM_W-1:0]          laser_duty,
  input  logic [PARAM_W-1:0]          laser_period,
  input  logic [PARAM_W-1:0]          frame_size,
  input  logic [PARAM_W-1:0]          count_before_laser,
  input  logic [PARAM_W-1:0]          delay_before_sync,
  input  logic [NUM_QUBIT_LASERS-1:0] reflex_in,
  output logic                        reflex_enable,
  output logic [NUM_QUBIT_LASERS-1:0] data_out,
  output logic                        new_data,
  output logic                        missed_sync    // pulse per lost sync
);
  typedef enum logic [1:0] {
    P_IDLE, P_SYNC, P_SLOT_READING, P_MISSED_SYNC
  } state_e;

  state_e                      state;
  logic [PARAM_W-1:0]          cyc;        // cycle in slot, 1 .. period
  logic [PARAM_W-1:0]          slot_cnt;
  logic [NUM_QUBIT_LASERS-1:0] acc;
  logic                        first_frame;
  logic [PARAM_W-1:0]          wait_cnt;   // cycles spent in SYNC
  logic [PARAM_W-1:0]          vt;         // virtual time in MISSED_SYNC
  logic [PARAM_W-1:0]          next_edge;  // virtual end of the next slot
  logic [PARAM_W-1:0]          period_eff, window, deadline;

  assign period_eff = (laser_period < 2) ? PARAM_W'(2) : laser_period;
  assign window     = (laser_duty == 0) ? '0 :
                      (laser_duty > period_eff) ? period_eff - 1 : laser_duty - 1;
  assign deadline   = count_before_laser + delay_before_sync +
                      PARAM_W'(SYNC_LATENCY + SYNC_EXTRA_CYCLES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= P_IDLE;
      cyc           <= '0;
      slot_cnt      <= '0;
      acc           <= '0;
      first_frame   <= 1'b1;
      wait_cnt      <= '0;
      vt            <= '0;
      next_edge     <= '0;
      reflex_enable <= 1'b0;
      data_out      <= '0;
      new_data      <= 1'b0;
      missed_sync   <= 1'b0;
    end else begin
      new_data    <= 1'b0;
      missed_sync <= 1'b0;
      unique case (state)
        P_IDLE: begin
          reflex_enable <= 1'b0;
          if (start_key) begin
            state       <= P_SYNC;
            first_frame <= 1'b1;
            wait_cnt    <= PARAM_W'(1);
          end
        end
        P_SYNC: begin
          reflex_enable <= 1'b0;
          acc           <= '0;
          slot_cnt      <= '0;
          wait_cnt      <= wait_cnt + 1;
          if (full) begin
            state <= P_IDLE;
          end else if (sync_start) begin
            state         <= P_SLOT_READING;
            first_frame   <= 1'b0;
            cyc           <= PARAM_W'(1);
            reflex_enable <= (window != 0);
          end else if (!first_frame && wait_cnt >= deadline) begin
            state       <= P_MISSED_SYNC;
            missed_sync <= 1'b1;
            // virtual time of the first MISSED_SYNC cycle, counted like cyc
            // would have been had sync_start come on time
            vt          <= PARAM_W'(SYNC_EXTRA_CYCLES + 1);
            next_edge   <= period_eff;
          end
        end
        P_SLOT_READING: begin
          acc <= acc | reflex_in;
          if (full) begin
            reflex_enable <= 1'b0;
            state         <= P_IDLE;
          end else if (cyc >= period_eff) begin
            data_out <= acc | reflex_in;
            new_data <= 1'b1;
            acc      <= '0;
            cyc      <= PARAM_W'(1);
            if (slot_cnt + 1 >= frame_size) begin
              slot_cnt      <= '0;
              reflex_enable <= 1'b0;
              wait_cnt      <= PARAM_W'(1);
              state         <= P_SYNC;
            end else begin
              slot_cnt      <= slot_cnt + 1;
              reflex_enable <= (window != 0);
            end
          end else begin
            cyc <= cyc + 1;
            if (cyc >= window) reflex_enable <= 1'b0;
          end
        end
        P_MISSED_SYNC: begin
          reflex_enable <= 1'b0;
          vt            <= vt + 1;
          if (full) begin
            state <= P_IDLE;
          end else if (vt >= next_edge) begin
            data_out  <= '1;
            new_data  <= 1'b1;
            next_edge <= next_edge + period_eff;
            if (slot_cnt + 1 >= frame_size) begin
              slot_cnt <= '0;
              wait_cnt <= PARAM_W'(1);
              state    <= P_SYNC;
            end else begin
              slot_cnt <= slot_cnt + 1;
            end
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
