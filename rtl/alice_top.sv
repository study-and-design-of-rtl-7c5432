// alice_top: custom logic of the transmitter board.
//
// Software writes the parameters (alice_params_t), fills the key RAM through
// port B and raises start_req. The start key watchman turns that into one
// start_key pulse. The key reader (mind_well) hands two key bits at a time to
// the laser controller, which lights one qubit laser per slot, while the
// synchronisation module (zeus_sync) fires the start impulses and, before
// every frame, the sync laser pulse followed 500 ns later by sync_start. The
// pointing generator and the output multiplexer let the optics be aligned
// with continuously pulsing lasers. The reset handler turns the software
// reset and the push button into the board reset.
//
// Interface: bram_b_* is the bus side of the key RAM (byte address, as the
// BRAM controller presents it; addresses are word aligned); interrupt_out
// asks software to refill the half of the RAM just read; tangled_alarm
// reports a refill that came too late (it also stops the laser controller,
// so the whole transmission halts); empty marks the end of the key.
// All signals are synchronous to clk except btn_rst.
module alice_top
  import quake_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH        = 8192,
  parameter int unsigned DATA_WIDTH        = 32,
  parameter int unsigned SYNC_DELAY_CYCLES = 50,
  parameter int unsigned DEBOUNCE_CYCLES   = 100_000,
  parameter int unsigned ADDR_W            = $clog2(BRAM_DEPTH * DATA_WIDTH / 8)
) (
  input  logic                        clk,
  input  logic                        btn_rst,
  input  logic                        sw_rst,
  input  logic                        start_req,
  input  alice_params_t               params,
  // slide switches for alignment
  input  logic                        sw_pointing_en,
  input  logic [NUM_QUBIT_LASERS-1:0] sw_lasers,
  input  logic                        sw_sync,
  // bus side of the key RAM
  input  logic                        bram_b_en,
  input  logic                        bram_b_we,
  input  logic [ADDR_W-1:0]           bram_b_addr,
  input  logic [DATA_WIDTH-1:0]       bram_b_din,
  output logic [DATA_WIDTH-1:0]       bram_b_dout,
  // laser pins
  output logic [NUM_QUBIT_LASERS-1:0] lasers,
  output logic                        laser_sync,
  // status
  output logic                        interrupt_out,
  output logic                        tangled_alarm,
  output logic                        empty
);
  logic                        rst_n;
  logic                        start_key;
  logic                        sync_please, sync_start;
  logic                        data_red;
  logic [1:0]                  key_bits;
  logic [NUM_QUBIT_LASERS-1:0] tx_lasers, pt_lasers;
  logic                        tx_sync, pt_sync;
  logic [ADDR_W-1:0]           bram_a_addr;
  logic                        bram_a_en;
  logic [DATA_WIDTH-1:0]       bram_a_dout;

  reset_handler #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_reset_handler (
    .clk(clk), .sw_rst(sw_rst), .btn_rst(btn_rst), .rst_n(rst_n));

  start_key_watchman u_start_key_watchman (
    .clk(clk), .rst_n(rst_n), .start_req(start_req), .start_key(start_key));

  mind_well #(.BRAM_DEPTH(BRAM_DEPTH), .DATA_WIDTH(DATA_WIDTH)) u_mind_well (
    .clk(clk), .rst_n(rst_n), .start_key(start_key), .data_red(data_red),
    .data_depth(params.data_depth), .interrupt_time(params.interrupt_time),
    .bram_addr(bram_a_addr), .bram_en(bram_a_en), .bram_dout(bram_a_dout),
    .bram_b_we(bram_b_en & bram_b_we), .data_out(key_bits), .empty(empty),
    .interrupt_out(interrupt_out), .tangled_alarm(tangled_alarm));

  laser_controller u_laser_controller (
    .clk(clk), .rst_n(rst_n), .start_key(start_key), .sync_start(sync_start),
    .protocol(params.protocol), .laser_duty(params.laser_duty),
    .laser_period(params.laser_period), .frame_size(params.frame_size),
    .data_in(key_bits), .empty(empty | tangled_alarm), .data_red(data_red),
    .sync_please(sync_please), .lasers(tx_lasers));

  zeus_sync #(.SYNC_DELAY_CYCLES(SYNC_DELAY_CYCLES)) u_zeus_sync (
    .clk(clk), .rst_n(rst_n), .start_key(start_key), .sync_please(sync_please),
    .start_type(params.start_type), .start_duty(params.start_duty),
    .start_period(params.start_period),
    .count_before_laser(params.count_before_laser),
    .sync_width(params.sync_width), .laser_sync(tx_sync),
    .sync_start(sync_start));

  system_pointing u_system_pointing (
    .clk(clk), .rst_n(rst_n), .enable(sw_pointing_en), .sw_lasers(sw_lasers),
    .sw_sync(sw_sync), .laser_duty(params.laser_duty),
    .laser_period(params.laser_period), .lasers(pt_lasers),
    .laser_sync(pt_sync));

  output_laser_mux u_output_laser_mux (
    .pointing_enable(sw_pointing_en), .tx_lasers(tx_lasers),
    .tx_laser_sync(tx_sync), .pointing_lasers(pt_lasers),
    .pointing_laser_sync(pt_sync), .lasers(lasers), .laser_sync(laser_sync));

  block_ram #(.DEPTH(BRAM_DEPTH), .WIDTH(DATA_WIDTH)) u_key_ram (
    .clk(clk),
    .ena(bram_a_en), .wea(1'b0), .addra(bram_a_addr[ADDR_W-1:2]),
    .dina('0), .douta(bram_a_dout),
    .enb(bram_b_en), .web(bram_b_we), .addrb(bram_b_addr[ADDR_W-1:2]),
    .dinb(bram_b_din), .doutb(bram_b_dout));

  // the bus side always uses word-aligned byte addresses
  logic unused_addr_lsb;
  assign unused_addr_lsb = ^{bram_a_addr[1:0], bram_b_addr[1:0]};
endmodule
