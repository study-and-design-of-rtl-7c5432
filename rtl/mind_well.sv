// mind_well: key reader of the transmitter.
//
// The key sits in the dual-port block RAM as 32-bit words, sixteen 2-bit key
// units per word, lowest bits first. On start_key the reader leaves IDLE for
// DATA_READING and offers the first unit on data_out; every data_red pulse
// from the laser controller moves it to the next unit. After the last unit of
// a word the byte address steps by 4 (one word). When data_depth units have
// been consumed, empty rises and the FSM returns to IDLE.
//
// The RAM is used as a ring buffer: software keeps refilling it through port
// B. Each time reading moves into the second half or wraps back to the first
// half, interrupt_out is raised for interrupt_time cycles so that the DMA can
// refill the half just finished. If at that moment port B is still writing
// (bram_b_we high), the refill of the half about to be read is late: the
// reader stops, returns to IDLE and raises tangled_alarm, which stays up,
// and blocks every start_key, until reset.
//
// Timing: the RAM has one cycle of read latency, so the reader holds the
// current word in a register and keeps the RAM address on the next word
// (prefetch); data_out is valid 3 cycles after start_key and changes the
// cycle after each data_red. data_red pulses must be at least 2 cycles apart
// (the laser controller's shortest slot). The prefetch register is this
// design's choice; the state machine, the half/end interrupts and the alarm
// follow the reference design.
//
// Constant outputs: bram_addr is a byte address of whole 32-bit words, so
// its two low bits are always 0 (synthesis reports them as idle outputs).
module mind_well
  import quake_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH = 8192,  // words
  parameter int unsigned DATA_WIDTH = 32,    // bits per word
  parameter int unsigned ADDR_W     = $clog2(BRAM_DEPTH * DATA_WIDTH / 8)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_key,
  input  logic                  data_red,
  input  logic [PARAM_W-1:0]    data_depth,      // key length, 2-bit units
  input  logic [PARAM_W-1:0]    interrupt_time,  // interrupt pulse, cycles
  // block RAM port A
  output logic [ADDR_W-1:0]     bram_addr,       // byte address
  output logic                  bram_en,
  input  logic [DATA_WIDTH-1:0] bram_dout,
  // write enable of the bus-side port B, watched for overlap
  input  logic                  bram_b_we,
  output logic [1:0]            data_out,
  output logic                  empty,
  output logic                  interrupt_out,
  output logic                  tangled_alarm
);
  localparam int unsigned UNITS  = DATA_WIDTH / 2;
  localparam int unsigned UW     = $clog2(UNITS);
  localparam int unsigned WORD_W = $clog2(BRAM_DEPTH);
  localparam logic [WORD_W-1:0] HALF = WORD_W'(BRAM_DEPTH / 2);

  typedef enum logic {M_IDLE, M_DATA_READING} state_e;

  state_e                state;
  logic [1:0]            prime;      // cycles left until the first word is in
  logic [DATA_WIDTH-1:0] cur_word;
  logic [UW-1:0]         unit_idx;
  logic [WORD_W-1:0]     next_word;  // word index the RAM address points at
  logic [PARAM_W-1:0]    consumed;
  logic [PARAM_W-1:0]    irq_cnt;
  logic                  boundary;   // next word starts a half

  assign data_out  = cur_word[2*unit_idx +: 2];
  assign bram_addr = ADDR_W'({next_word, 2'b00});
  assign boundary  = (next_word == HALF) || (next_word == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= M_IDLE;
      prime         <= '0;
      cur_word      <= '0;
      unit_idx      <= '0;
      next_word     <= '0;
      consumed      <= '0;
      irq_cnt       <= '0;
      bram_en       <= 1'b0;
      empty         <= 1'b0;
      interrupt_out <= 1'b0;
      tangled_alarm <= 1'b0;
    end else begin
      // interrupt pulse stretcher
      if (irq_cnt != 0) begin
        irq_cnt       <= irq_cnt - 1;
        interrupt_out <= (irq_cnt > 1);
      end else begin
        interrupt_out <= 1'b0;
      end

      unique case (state)
        M_IDLE: begin
          bram_en <= 1'b0;
          if (start_key && !tangled_alarm) begin
            state     <= M_DATA_READING;
            next_word <= '0;
            unit_idx  <= '0;
            consumed  <= '0;
            prime     <= 2'd2;
            bram_en   <= 1'b1;
            empty     <= (data_depth == 0);
            if (data_depth == 0) state <= M_IDLE;
          end
        end
        M_DATA_READING: begin
          bram_en <= 1'b1;
          if (prime != 0) begin
            prime <= prime - 1'b1;
            if (prime == 2'd1) begin
              cur_word  <= bram_dout;
              next_word <= next_word + 1'b1;
            end
          end else if (data_red) begin
            consumed <= consumed + 1;
            if (consumed + 1 >= data_depth) begin
              empty   <= 1'b1;
              bram_en <= 1'b0;
              state   <= M_IDLE;
            end
            if (unit_idx == UW'(UNITS - 1)) begin
              unit_idx  <= '0;
              cur_word  <= bram_dout;
              next_word <= next_word + 1'b1;
              if (boundary) begin
                // finished a half: ask for a refill, check for overlap
                irq_cnt       <= (interrupt_time == 0) ? PARAM_W'(1) : interrupt_time;
                interrupt_out <= 1'b1;
                if (bram_b_we) begin
                  tangled_alarm <= 1'b1;
                  bram_en       <= 1'b0;
                  state         <= M_IDLE;
                end
              end
            end else begin
              unit_idx <= unit_idx + 1'b1;
            end
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
