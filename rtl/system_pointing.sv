// system_pointing: laser alignment mode of the transmitter.
//
// To centre each laser beam on its single-photon detector the lasers must run
// continuously. While enable is on, every qubit laser whose switch is on
// pulses without end with the software-set slot period (laser_period cycles)
// and on-time (laser_duty cycles); the sync laser, which has no meaningful
// period, is simply held on while its switch is on. With enable off all
// outputs are low.
//
// Timing: a free-running counter 0 .. laser_period-1 gives the pulse; outputs
// are registered. A period below 1 is treated as 1.
module system_pointing
  import quake_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic [NUM_QUBIT_LASERS-1:0] sw_lasers,
  input  logic                        sw_sync,
  input  logic [PARAM_W-1:0]          laser_duty,
  input  logic [PARAM_W-1:0]          laser_period,
  output logic [NUM_QUBIT_LASERS-1:0] lasers,
  output logic                        laser_sync
);
  logic [PARAM_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      lasers     <= '0;
      laser_sync <= 1'b0;
    end else if (!enable) begin
      cnt        <= '0;
      lasers     <= '0;
      laser_sync <= 1'b0;
    end else begin
      cnt        <= (cnt + 1 >= laser_period) ? '0 : cnt + 1;
      lasers     <= (cnt < laser_duty) ? sw_lasers : '0;
      laser_sync <= sw_sync;
    end
  end
endmodule
