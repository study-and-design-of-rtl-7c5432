// quake_top: the two boards of the key-exchange system side by side.
//
// The transmitter (alice_top) encodes a key stored in its RAM onto four qubit
// lasers, slot by slot, in frames that each begin with a sync laser pulse;
// the receiver (bob_top) re-times itself on every sync pulse and stores what
// its four single-photon detectors saw in each slot. The two boards have
// independent clocks (clk_alice, clk_bob) that drift against each other,
// which is why the key is cut into frames.
//
// Between them lies the quantum channel: free-space optics, or coaxial cables
// in a bench test. It is not logic, so the transmitter's laser pins
// (alice_lasers, alice_laser_sync) and the receiver's detector pins (bob_spd,
// bob_spd_sync) are separate ports; the environment connects them.
//
// Also here, with ports of its own, is the clock drift counter used to
// measure how far the board oscillators drift, which sets the longest safe
// frame.
module quake_top
  import quake_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH        = 8192,
  parameter int unsigned DATA_WIDTH        = 32,
  parameter int unsigned SYNC_DELAY_CYCLES = 50,
  parameter int unsigned SYNC_EXTRA_CYCLES = 5,
  parameter int unsigned SYNC_LATENCY      = 3,
  parameter int unsigned DEBOUNCE_CYCLES   = 100_000,
  parameter int unsigned ADDR_W            = $clog2(BRAM_DEPTH * DATA_WIDTH / 8)
) (
  // ---------------- transmitter board ----------------
  input  logic                        clk_alice,
  input  logic                        alice_btn_rst,
  input  logic                        alice_sw_rst,
  input  logic                        alice_start_req,
  input  alice_params_t               alice_params,
  input  logic                        alice_sw_pointing_en,
  input  logic [NUM_QUBIT_LASERS-1:0] alice_sw_lasers,
  input  logic                        alice_sw_sync,
  input  logic                        alice_bram_b_en,
  input  logic                        alice_bram_b_we,
  input  logic [ADDR_W-1:0]           alice_bram_b_addr,
  input  logic [DATA_WIDTH-1:0]       alice_bram_b_din,
  output logic [DATA_WIDTH-1:0]       alice_bram_b_dout,
  output logic [NUM_QUBIT_LASERS-1:0] alice_lasers,
  output logic                        alice_laser_sync,
  output logic                        alice_interrupt,
  output logic                        alice_tangled_alarm,
  output logic                        alice_empty,
  // ---------------- receiver board ----------------
  input  logic                        clk_bob,
  input  logic                        bob_btn_rst,
  input  logic                        bob_sw_rst,
  input  logic                        bob_external_start,
  input  bob_params_t                 bob_params,
  input  logic [NUM_QUBIT_LASERS-1:0] bob_spd,
  input  logic                        bob_spd_sync,
  input  logic                        bob_bram_b_en,
  input  logic                        bob_bram_b_we,
  input  logic [ADDR_W-1:0]           bob_bram_b_addr,
  input  logic [DATA_WIDTH-1:0]       bob_bram_b_din,
  output logic [DATA_WIDTH-1:0]       bob_bram_b_dout,
  output logic                        bob_interrupt,
  output logic                        bob_full,
  output logic                        bob_missed_sync,
  output logic                        bob_start_red,
  // ---------------- clock drift measurement ----------------
  input  logic                        clk_meas,
  input  logic                        meas_rst_n,
  input  logic [1:0]                  meas_sel,
  output logic                        meas_go,
  output logic                        meas_stop
);
  alice_top #(
    .BRAM_DEPTH(BRAM_DEPTH), .DATA_WIDTH(DATA_WIDTH),
    .SYNC_DELAY_CYCLES(SYNC_DELAY_CYCLES), .DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)
  ) u_alice (
    .clk(clk_alice), .btn_rst(alice_btn_rst), .sw_rst(alice_sw_rst),
    .start_req(alice_start_req), .params(alice_params),
    .sw_pointing_en(alice_sw_pointing_en), .sw_lasers(alice_sw_lasers),
    .sw_sync(alice_sw_sync),
    .bram_b_en(alice_bram_b_en), .bram_b_we(alice_bram_b_we),
    .bram_b_addr(alice_bram_b_addr), .bram_b_din(alice_bram_b_din),
    .bram_b_dout(alice_bram_b_dout),
    .lasers(alice_lasers), .laser_sync(alice_laser_sync),
    .interrupt_out(alice_interrupt), .tangled_alarm(alice_tangled_alarm),
    .empty(alice_empty));

  bob_top #(
    .BRAM_DEPTH(BRAM_DEPTH), .DATA_WIDTH(DATA_WIDTH),
    .SYNC_EXTRA_CYCLES(SYNC_EXTRA_CYCLES), .SYNC_LATENCY(SYNC_LATENCY),
    .DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)
  ) u_bob (
    .clk(clk_bob), .btn_rst(bob_btn_rst), .sw_rst(bob_sw_rst),
    .external_start(bob_external_start), .params(bob_params),
    .spd(bob_spd), .spd_sync(bob_spd_sync),
    .bram_b_en(bob_bram_b_en), .bram_b_we(bob_bram_b_we),
    .bram_b_addr(bob_bram_b_addr), .bram_b_din(bob_bram_b_din),
    .bram_b_dout(bob_bram_b_dout),
    .interrupt_out(bob_interrupt), .full(bob_full),
    .missed_sync(bob_missed_sync), .start_red(bob_start_red));

  clock_drift_counter u_clock_drift_counter (
    .clk(clk_meas), .rst_n(meas_rst_n), .sel(meas_sel),
    .go(meas_go), .stop(meas_stop));
endmodule
