// bob_top: custom logic of the receiver board.
//
// The four single-photon detectors feed the reflex photon translator, which
// stretches accepted clicks into the receiver clock domain. The slot
// controller (laser_pinball) opens the detector window once per slot and
// delivers one 4-bit word of clicks per slot; the word composer (bit_ben)
// packs these into 32-bit words in the receive RAM, which software drains
// through port B on every half/end interrupt. The synchronisation module
// (hermes_sync) decodes the start (three sync-laser impulses, or an external
// start from software) and turns each frame's sync laser pulse into
// sync_start after delay_before_sync cycles. The reset handler gives the
// board reset.
//
// Interface: spd and spd_sync are the asynchronous detector outputs;
// bram_b_* is the bus side of the receive RAM (byte addresses); full marks
// the whole key stored; missed_sync pulses for every frame whose sync pulse
// was lost (that frame is stored as 1111 words); start_red acknowledges an
// external start. All other signals are synchronous to clk.
module bob_top
  import quake_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH        = 8192,
  parameter int unsigned DATA_WIDTH        = 32,
  parameter int unsigned SYNC_EXTRA_CYCLES = 5,
  parameter int unsigned SYNC_LATENCY      = 3,
  parameter int unsigned DEBOUNCE_CYCLES   = 100_000,
  parameter int unsigned ADDR_W            = $clog2(BRAM_DEPTH * DATA_WIDTH / 8)
) (
  input  logic                        clk,
  input  logic                        btn_rst,
  input  logic                        sw_rst,
  input  logic                        external_start,
  input  bob_params_t                 params,
  // detectors
  input  logic [NUM_QUBIT_LASERS-1:0] spd,
  input  logic                        spd_sync,
  // bus side of the receive RAM
  input  logic                        bram_b_en,
  input  logic                        bram_b_we,
  input  logic [ADDR_W-1:0]           bram_b_addr,
  input  logic [DATA_WIDTH-1:0]       bram_b_din,
  output logic [DATA_WIDTH-1:0]       bram_b_dout,
  // status
  output logic                        interrupt_out,
  output logic                        full,
  output logic                        missed_sync,
  output logic                        start_red
);
  logic                        rst_n;
  logic                        start_key;
  logic                        sync_start;
  logic                        reflex_enable;
  logic [NUM_QUBIT_LASERS-1:0] reflex_out;
  logic [NUM_QUBIT_LASERS-1:0] slot_word;
  logic                        new_data;
  logic [ADDR_W-1:0]           bram_a_addr;
  logic [DATA_WIDTH-1:0]       bram_a_din;
  logic                        bram_a_en, bram_a_we;
  logic [DATA_WIDTH-1:0]       bram_a_dout;

  reset_handler #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_reset_handler (
    .clk(clk), .sw_rst(sw_rst), .btn_rst(btn_rst), .rst_n(rst_n));

  hermes_sync u_hermes_sync (
    .clk(clk), .rst_n(rst_n), .sync_laser(spd_sync),
    .external_start(external_start), .start_type(params.start_type),
    .start_period(params.start_period),
    .delay_before_sync(params.delay_before_sync), .full(full),
    .start_key(start_key), .start_red(start_red), .sync_start(sync_start));

  reflex_photon_translator #(.CHANNELS(NUM_QUBIT_LASERS)) u_reflex (
    .clk(clk), .rst_n(rst_n), .reflex_enable(reflex_enable), .spd(spd),
    .reflex_out(reflex_out));

  laser_pinball #(
    .SYNC_EXTRA_CYCLES(SYNC_EXTRA_CYCLES), .SYNC_LATENCY(SYNC_LATENCY)
  ) u_laser_pinball (
    .clk(clk), .rst_n(rst_n), .start_key(start_key), .sync_start(sync_start),
    .full(full), .laser_duty(params.laser_duty),
    .laser_period(params.laser_period), .frame_size(params.frame_size),
    .count_before_laser(params.count_before_laser),
    .delay_before_sync(params.delay_before_sync), .reflex_in(reflex_out),
    .reflex_enable(reflex_enable), .data_out(slot_word), .new_data(new_data),
    .missed_sync(missed_sync));

  bit_ben #(.BRAM_DEPTH(BRAM_DEPTH), .DATA_WIDTH(DATA_WIDTH)) u_bit_ben (
    .clk(clk), .rst_n(rst_n), .start_key(start_key), .protocol(params.protocol),
    .new_data(new_data), .data_in(slot_word), .data_depth(params.data_depth),
    .interrupt_time(params.interrupt_time), .bram_addr(bram_a_addr),
    .bram_din(bram_a_din), .bram_en(bram_a_en), .bram_we(bram_a_we),
    .interrupt_out(interrupt_out), .full(full));

  block_ram #(.DEPTH(BRAM_DEPTH), .WIDTH(DATA_WIDTH)) u_rx_ram (
    .clk(clk),
    .ena(bram_a_en), .wea(bram_a_we), .addra(bram_a_addr[ADDR_W-1:2]),
    .dina(bram_a_din), .douta(bram_a_dout),
    .enb(bram_b_en), .web(bram_b_we), .addrb(bram_b_addr[ADDR_W-1:2]),
    .dinb(bram_b_din), .doutb(bram_b_dout));

  // port A is write-only, the lowest address bits are always zero, and the
  // start impulse width and sync width matter only to the transmitter
  logic unused;
  assign unused = ^{bram_a_dout, bram_a_addr[1:0], bram_b_addr[1:0],
                    params.start_duty, params.sync_width};
endmodule
