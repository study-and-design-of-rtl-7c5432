// zeus_sync: transmitter-side synchronisation of the two boards.
//
// The two boards run on unrelated clocks, so the key is sent in frames and
// every frame starts with a pulse on a dedicated synchronisation laser. This
// one-process Moore FSM has three states:
//   IDLE      - waits. A start_key in start-with-laser mode goes to CANNON;
//               a pending sync request goes to SYNC_SEND. Requests
//               (sync_please) are remembered while the FSM is busy and are
//               ignored until a start_key has been seen.
//   CANNON    - fires START_IMPULSES (three) impulses on the sync laser, each
//               start_duty cycles on within a start_period-cycle period, so
//               the receiver learns that a key transmission begins.
//   SYNC_SEND - waits count_before_laser cycles, then raises laser_sync for
//               sync_width cycles. SYNC_DELAY_CYCLES (500 ns) after the rise
//               of laser_sync it pulses sync_start for one cycle, which lets
//               the laser controller begin the frame.
// In start-with-external-channel mode there is no CANNON: start_key only
// arms the module.
//
// Timing (cycles after the sync_please pulse is seen): laser_sync rises
// count_before_laser + 2 cycles later; sync_start follows the rise of
// laser_sync by exactly SYNC_DELAY_CYCLES. The fixed 500 ns delay is the
// reference design's; the remembering of early requests and the clamping of
// zero widths to one cycle are this design's choices.
module zeus_sync
  import quake_pkg::*;
#(
  parameter int unsigned SYNC_DELAY_CYCLES = 50,  // 500 ns at 100 MHz
  parameter int unsigned START_IMPULSES    = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_key,
  input  logic               sync_please,
  input  start_type_e        start_type,
  input  logic [PARAM_W-1:0] start_duty,
  input  logic [PARAM_W-1:0] start_period,
  input  logic [PARAM_W-1:0] count_before_laser,
  input  logic [PARAM_W-1:0] sync_width,
  output logic               laser_sync,
  output logic               sync_start
);
  typedef enum logic [1:0] {Z_IDLE, Z_CANNON, Z_SYNC_SEND} state_e;

  state_e             state;
  logic               started;
  logic               pending;
  logic [PARAM_W-1:0] t;
  logic [7:0]         impulses;
  logic [PARAM_W-1:0] period_eff, width_eff, sync_end;

  assign period_eff = (start_period < 2) ? PARAM_W'(2) : start_period;
  assign width_eff  = (sync_width == 0) ? PARAM_W'(1) : sync_width;
  assign sync_end   = count_before_laser +
                      ((width_eff > SYNC_DELAY_CYCLES) ? width_eff
                                                       : PARAM_W'(SYNC_DELAY_CYCLES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= Z_IDLE;
      started    <= 1'b0;
      pending    <= 1'b0;
      t          <= '0;
      impulses   <= '0;
      laser_sync <= 1'b0;
      sync_start <= 1'b0;
    end else begin
      sync_start <= 1'b0;
      if (start_key) started <= 1'b1;
      if (sync_please && (started || start_key)) pending <= 1'b1;
      unique case (state)
        Z_IDLE: begin
          laser_sync <= 1'b0;
          t          <= '0;
          impulses   <= '0;
          if (start_key && start_type == START_LASER) begin
            state <= Z_CANNON;
          end else if (pending) begin
            pending <= 1'b0;
            state   <= Z_SYNC_SEND;
          end
        end
        Z_CANNON: begin
          laser_sync <= (t < start_duty);
          if (t >= period_eff - 1) begin
            t        <= '0;
            impulses <= impulses + 1'b1;
            if (32'(impulses) + 1 >= START_IMPULSES) state <= Z_IDLE;
          end else begin
            t <= t + 1;
          end
        end
        Z_SYNC_SEND: begin
          laser_sync <= (t >= count_before_laser) &&
                        (t <  count_before_laser + width_eff);
          if (t == count_before_laser + SYNC_DELAY_CYCLES) sync_start <= 1'b1;
          if (t >= sync_end) state <= Z_IDLE;
          else               t     <= t + 1;
        end
        default: state <= Z_IDLE;
      endcase
    end
  end
endmodule
