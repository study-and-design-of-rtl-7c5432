// bit_ben: word composer of the receiver.
//
// Two-state FSM (IDLE, WORD_COMPOSING). From start_key on, every new_data
// pulse of the slot controller delivers one slot word of detector bits: all
// four bits in BB84, only channels 0 and 2 ({data_in[2], data_in[0]}) in
// B92. The bits are packed lowest first into a DATA_WIDTH-bit word; a full
// word is written to the block RAM by a one-cycle bram_en pulse (the RAM's
// write enable is tied high, the port enable does the writing), after which
// the byte address steps by 4. The RAM is a ring of BRAM_DEPTH words: when a
// write completes the first half or the end, interrupt_out rises for
// interrupt_time cycles so that the DMA can drain that half. When the whole
// key has arrived (4 * data_depth bits, i.e. data_depth slots in BB84 and
// 2 * data_depth in B92) the last, possibly partial, word is written and
// full rises; the FSM returns to IDLE. full stays up until the next start.
//
// Timing: the word write happens 1 cycle after the new_data that completes
// it; new_data may come every cycle. Zero-padding of a partial last word and
// the data_depth unit (two transmitter key bits = four receiver bits) are
// this design's choices.
//
// Constant outputs: bram_addr is a byte address of whole 32-bit words, so
// its two low bits are always 0, and bram_we is tied high (writes are made
// with bram_en alone); synthesis reports these three bits as idle outputs.
module bit_ben
  import quake_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH = 8192,  // words
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned ADDR_W     = $clog2(BRAM_DEPTH * DATA_WIDTH / 8)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start_key,
  input  protocol_e                   protocol,
  input  logic                        new_data,
  input  logic [NUM_QUBIT_LASERS-1:0] data_in,
  input  logic [PARAM_W-1:0]          data_depth,
  input  logic [PARAM_W-1:0]          interrupt_time,
  output logic [ADDR_W-1:0]           bram_addr,   // byte address
  output logic [DATA_WIDTH-1:0]       bram_din,
  output logic                        bram_en,
  output logic                        bram_we,
  output logic                        interrupt_out,
  output logic                        full
);
  localparam int unsigned WORD_W = $clog2(BRAM_DEPTH);
  localparam int unsigned FW     = $clog2(DATA_WIDTH + 1);
  localparam logic [WORD_W-1:0] HALF_LAST = WORD_W'(BRAM_DEPTH / 2 - 1);
  localparam logic [WORD_W-1:0] LAST      = WORD_W'(BRAM_DEPTH - 1);

  typedef enum logic {B_IDLE, B_WORD_COMPOSING} state_e;

  state_e                state;
  logic [DATA_WIDTH-1:0] word;
  logic [FW-1:0]         fill;
  logic [WORD_W-1:0]     wr_word;     // word index of the next write
  logic [WORD_W-1:0]     write_word;  // word index of the write in progress
  logic [PARAM_W+1:0]    bits_left;
  logic [PARAM_W-1:0]    irq_cnt;
  logic                  wr_pending;

  // next word value and fill after accepting the current slot word
  logic [DATA_WIDTH-1:0] word_nx;
  logic [FW-1:0]         fill_nx;
  logic [2:0]            nbits;

  always_comb begin
    word_nx = word;
    if (protocol == PROTO_B92) begin
      nbits = 3'd2;
      word_nx[fill[FW-2:0] +: 2] = {data_in[2], data_in[0]};
    end else begin
      nbits = 3'd4;
      word_nx[fill[FW-2:0] +: 4] = data_in;
    end
    fill_nx = fill + FW'(nbits);
  end

  assign bram_we   = 1'b1;
  assign bram_addr = ADDR_W'({write_word, 2'b00});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= B_IDLE;
      word          <= '0;
      fill          <= '0;
      wr_word       <= '0;
      write_word    <= '0;
      bits_left     <= '0;
      irq_cnt       <= '0;
      wr_pending    <= 1'b0;
      bram_din      <= '0;
      bram_en       <= 1'b0;
      interrupt_out <= 1'b0;
      full          <= 1'b0;
    end else begin
      bram_en <= 1'b0;
      if (irq_cnt != 0) begin
        irq_cnt       <= irq_cnt - 1;
        interrupt_out <= (irq_cnt > 1);
      end else begin
        interrupt_out <= 1'b0;
      end

      // a write was issued last cycle: advance the address, raise interrupts
      if (wr_pending) begin
        wr_pending <= 1'b0;
        wr_word    <= wr_word + 1'b1;
        if (write_word == HALF_LAST || write_word == LAST) begin
          irq_cnt       <= (interrupt_time == 0) ? PARAM_W'(1) : interrupt_time;
          interrupt_out <= 1'b1;
        end
      end

      unique case (state)
        B_IDLE: begin
          if (start_key) begin
            state     <= B_WORD_COMPOSING;
            word      <= '0;
            fill      <= '0;
            wr_word   <= '0;
            full      <= 1'b0;
            bits_left <= {data_depth, 2'b00};
            if (data_depth == 0) begin
              full  <= 1'b1;
              state <= B_IDLE;
            end
          end
        end
        B_WORD_COMPOSING: begin
          if (new_data) begin
            if (fill_nx >= FW'(DATA_WIDTH) || bits_left <= (PARAM_W+2)'(nbits)) begin
              bram_din   <= word_nx;
              bram_en    <= 1'b1;
              write_word <= wr_pending ? wr_word + 1'b1 : wr_word;
              wr_pending <= 1'b1;
              word       <= '0;
              fill       <= '0;
            end else begin
              word <= word_nx;
              fill <= fill_nx;
            end
            if (bits_left <= (PARAM_W+2)'(nbits)) begin
              bits_left <= '0;
              full      <= 1'b1;
              state     <= B_IDLE;
            end else begin
              bits_left <= bits_left - (PARAM_W+2)'(nbits);
            end
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule
