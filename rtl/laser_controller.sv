// laser_controller: drives the four qubit lasers of the transmitter.
//
// One-process Moore FSM with registered outputs and five states:
//   IDLE  - lasers off; start_key moves to SYNC and raises sync_please.
//   SYNC  - lasers off; waits for sync_start from the synchronisation module,
//           then enters the protocol state chosen by `protocol`.
//   BB84  - ends the key (back to IDLE) if the key reader is empty; otherwise
//           takes the two key bits {basis, bit} = data_in[1:0], lights laser
//           channel {basis, bit} and pulses data_red (next pair, please).
//   B92   - same, but one bit per slot: on the first visit data_in[0], on
//           the second data_in[1] together with data_red, so data_red runs at
//           half rate. Bit 0 lights channel 0, bit 1 channel 2.
//   SLOT  - counts the slot: the laser goes off after laser_duty cycles; after
//           laser_period cycles in all the slot ends. After frame_size slots
//           the FSM raises sync_please and goes back to SYNC for the next
//           frame, otherwise it returns to the protocol state.
// Lasers are switched off in IDLE and SYNC and overwritten in the protocol
// states, so a 100 % duty cycle (laser_duty = laser_period) works.
//
// Timing: one slot lasts exactly laser_period cycles (protocol state + the
// SLOT cycles); the laser is high for min(laser_duty, laser_period) cycles,
// starting the cycle after the protocol state. sync_start -> first laser on
// is 2 cycles. laser_period below 2 is treated as 2 (the shortest slot this
// FSM can make), laser_duty 0 as 1, frame_size 0 as 1.
// The FSM structure and its signals follow the reference design; the
// channel numbering and bit order of data_in are this design's choice.
module laser_controller
  import quake_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start_key,
  input  logic                        sync_start,
  input  protocol_e                   protocol,
  input  logic [PARAM_W-1:0]          laser_duty,
  input  logic [PARAM_W-1:0]          laser_period,
  input  logic [PARAM_W-1:0]          frame_size,
  input  logic [1:0]                  data_in,     // from the key reader
  input  logic                        empty,       // key finished
  output logic                        data_red,    // pair consumed
  output logic                        sync_please, // frame needs a sync
  output logic [NUM_QUBIT_LASERS-1:0] lasers
);
  typedef enum logic [2:0] {
    S_IDLE, S_SYNC, S_BB84, S_B92, S_SLOT
  } state_e;

  state_e             state;
  state_e             proto_state;
  logic [PARAM_W-1:0] cyc;        // cycle within the slot, 1 .. period-1
  logic [PARAM_W-1:0] slot_cnt;   // slots done in this frame
  logic               b92_second; // next B92 visit reads the second bit
  logic [PARAM_W-1:0] period_eff;

  assign period_eff = (laser_period < 2) ? PARAM_W'(2) : laser_period;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      proto_state <= S_BB84;
      cyc         <= '0;
      slot_cnt    <= '0;
      b92_second  <= 1'b0;
      data_red    <= 1'b0;
      sync_please <= 1'b0;
      lasers      <= '0;
    end else begin
      data_red    <= 1'b0;
      sync_please <= 1'b0;
      unique case (state)
        S_IDLE: begin
          lasers <= '0;
          if (start_key) begin
            state       <= S_SYNC;
            sync_please <= 1'b1;
            slot_cnt    <= '0;
            b92_second  <= 1'b0;
            proto_state <= (protocol == PROTO_B92) ? S_B92 : S_BB84;
          end
        end
        S_SYNC: begin
          lasers   <= '0;
          slot_cnt <= '0;
          if (sync_start) state <= proto_state;
        end
        S_BB84: begin
          if (empty) begin
            lasers <= '0;
            state  <= S_IDLE;
          end else begin
            lasers   <= NUM_QUBIT_LASERS'(1) << {data_in[1], data_in[0]};
            data_red <= 1'b1;
            cyc      <= PARAM_W'(1);
            state    <= S_SLOT;
          end
        end
        S_B92: begin
          if (empty && !b92_second) begin
            lasers <= '0;
            state  <= S_IDLE;
          end else begin
            if (b92_second ? data_in[1] : data_in[0])
              lasers <= NUM_QUBIT_LASERS'(1) << CH_P45;
            else
              lasers <= NUM_QUBIT_LASERS'(1) << CH_H;
            data_red   <= b92_second;
            b92_second <= ~b92_second;
            cyc        <= PARAM_W'(1);
            state      <= S_SLOT;
          end
        end
        S_SLOT: begin
          if (cyc >= laser_duty) lasers <= '0;
          if (cyc >= period_eff - 1) begin
            if (empty) begin
              // the key ended with this slot: no sync for a frame that
              // would carry nothing (idle turns the lasers off)
              slot_cnt <= '0;
              state    <= S_IDLE;
            end else if (slot_cnt + 1 >= frame_size) begin
              slot_cnt    <= '0;
              sync_please <= 1'b1;
              state       <= S_SYNC;
            end else begin
              slot_cnt <= slot_cnt + 1;
              state    <= proto_state;
            end
          end else begin
            cyc <= cyc + 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
