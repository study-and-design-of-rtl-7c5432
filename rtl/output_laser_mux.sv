// output_laser_mux: chooses what drives the transmitter's laser pins.
//
// With the pointing enable switch off, the pins follow the key transmission
// (qubit lasers from the laser controller, sync laser from the
// synchronisation module); with it on, they follow the alignment generator.
// Purely combinational.
module output_laser_mux
  import quake_pkg::*;
(
  input  logic                        pointing_enable,
  input  logic [NUM_QUBIT_LASERS-1:0] tx_lasers,
  input  logic                        tx_laser_sync,
  input  logic [NUM_QUBIT_LASERS-1:0] pointing_lasers,
  input  logic                        pointing_laser_sync,
  output logic [NUM_QUBIT_LASERS-1:0] lasers,
  output logic                        laser_sync
);
  always_comb begin
    if (pointing_enable) begin
      lasers     = pointing_lasers;
      laser_sync = pointing_laser_sync;
    end else begin
      lasers     = tx_lasers;
      laser_sync = tx_laser_sync;
    end
  end
endmodule
