// quake_pkg: types and constants shared by the Alice (transmitter) and Bob
// (receiver) sides of the qubit key-exchange controller.
//
// All timing parameters are counted in cycles of the board clock (100 MHz in
// the reference setup, so one cycle is 10 ns). Software writes them as 32-bit
// values; the 1-bit fields are the protocol and start-type selections.
//
// Qubit channel numbering (used by the Alice laser outputs, the Bob detector
// inputs and the 4-bit Bob slot word):
//   channel 0 : H    (rectilinear basis, bit 0)
//   channel 1 : V    (rectilinear basis, bit 1)
//   channel 2 : +45  (diagonal basis,    bit 0)
//   channel 3 : -45  (diagonal basis,    bit 1)
// so in BB84 the channel index is {basis, bit}. In B92 only channels 0 and 2
// carry qubits (bit 0 -> channel 0, bit 1 -> channel 2); which polarisation
// each of those two connectors produces or detects is set by the optics.
//
// Lint note: a module that imports this package but does not use every
// constant gets an "unused parameter" report for the others; the constants
// are shared on purpose and the reports are harmless.
package quake_pkg;

  localparam int unsigned PARAM_W = 32;   // width of a software parameter

  // Protocol selection input (1 bit from software)
  typedef enum logic {
    PROTO_BB84 = 1'b0,
    PROTO_B92  = 1'b1
  } protocol_e;

  // Start type selection input (1 bit from software)
  typedef enum logic {
    START_LASER    = 1'b0,  // three impulses on the synchronisation laser
    START_EXTERNAL = 1'b1   // start agreed over Ethernet / Wi-Fi
  } start_type_e;

  localparam int unsigned NUM_QUBIT_LASERS = 4;
  // Laser / detector channels: 0 = H, 1 = V, 2 = +45, 3 = -45. In BB84 the
  // channel index is {basis, bit}; B92 uses only H (bit 0) and +45 (bit 1).
  localparam int unsigned CH_H   = 0;
  localparam int unsigned CH_P45 = 2;

  // Parameters software writes into Alice (the GPIO channels of the board)
  typedef struct packed {
    logic [PARAM_W-1:0] laser_duty;          // qubit laser on-time, cycles
    logic [PARAM_W-1:0] laser_period;        // qubit slot length, cycles
    logic [PARAM_W-1:0] start_duty;          // start impulse on-time, cycles
    logic [PARAM_W-1:0] start_period;        // start impulse period, cycles
    logic [PARAM_W-1:0] count_before_laser;  // cycles before the sync pulse
    logic [PARAM_W-1:0] sync_width;          // sync pulse length, cycles
    logic [PARAM_W-1:0] frame_size;          // qubit slots per frame
    logic [PARAM_W-1:0] data_depth;          // key length in 2-bit key units
    logic [PARAM_W-1:0] interrupt_time;      // interrupt pulse length, cycles
    protocol_e          protocol;
    start_type_e        start_type;
  } alice_params_t;

  // Parameters software writes into Bob: Alice's set plus delay_before_sync
  typedef struct packed {
    logic [PARAM_W-1:0] laser_duty;
    logic [PARAM_W-1:0] laser_period;
    logic [PARAM_W-1:0] start_duty;
    logic [PARAM_W-1:0] start_period;
    logic [PARAM_W-1:0] count_before_laser;
    logic [PARAM_W-1:0] sync_width;
    logic [PARAM_W-1:0] frame_size;
    logic [PARAM_W-1:0] data_depth;
    logic [PARAM_W-1:0] interrupt_time;
    logic [PARAM_W-1:0] delay_before_sync;   // sync laser -> sync_start, cycles
    protocol_e          protocol;
    start_type_e        start_type;
  } bob_params_t;

endpackage
