// Audio codec controller ("AudioControl" block).
//
// It supplies the codec master clock xck (clk / XCK_DIV) and writes the
// codec's configuration over the two-wire (I2C) control bus after reset and
// whenever start pulses. Each of the N_WORDS writes is one bus transaction:
// START, device address byte (write), the two bytes of a 16-bit control
// word (7-bit register address, 9-bit value), STOP. The bus runs at I2C_HZ;
// every bit takes four quarter-periods (SDA set with SCL low, SCL high, SDA
// sampled, SCL low). SDA is open-drain: sda_oe = 1 pulls the line low;
// sda_in is the line as seen on the pin. A missing acknowledge sets
// ack_error (sticky until the next start); the sequence still completes.
//
// That the FPGA configures and controls the codec, with microphone or line
// input, follows the published design. The bus, the word list and its
// values (those of a WM8731-type codec: I2S master, 16-bit, 48 kHz normal
// mode, line or microphone input chosen by input_sel) are choices of this
// implementation.
//
// Timing: busy is high from the start pulse (or reset) until the last STOP;
// done is high after a sequence has ended, until the next start.
module audio_control #(
  parameter int unsigned CLK_HZ   = tx_pkg::CLK_HZ,
  parameter int unsigned I2C_HZ   = 100_000,
  parameter int unsigned XCK_DIV  = 4,
  parameter logic [7:0]  DEV_ADDR = 8'h34
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic input_sel,   // 0: line in, 1: microphone
  output logic xck,
  output logic scl,
  output logic sda_oe,
  input  logic sda_in,
  output logic busy,
  output logic done,
  output logic ack_error
);

  localparam int unsigned QDIV    = CLK_HZ / (4 * I2C_HZ);
  localparam int unsigned N_WORDS = 9;

  // ---------------- codec master clock ----------------
  logic [$clog2(XCK_DIV)-1:0] xck_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) xck_cnt <= '0;
    else        xck_cnt <= xck_cnt + 1'b1;
  end
  assign xck = xck_cnt[$clog2(XCK_DIV)-1];

  // ---------------- configuration words ----------------
  function automatic logic [15:0] cfg_word(input logic [3:0] idx, input logic mic);
    case (idx)
      4'd0:    return {7'h0F, 9'h000};                  // reset
      4'd1:    return {7'h00, 9'h017};                  // left line in 0 dB
      4'd2:    return {7'h01, 9'h017};                  // right line in 0 dB
      4'd3:    return {7'h04, mic ? 9'h015 : 9'h012};   // analogue path
      4'd4:    return {7'h05, 9'h000};                  // digital path
      4'd5:    return {7'h06, 9'h000};                  // power on
      4'd6:    return {7'h07, 9'h042};                  // master, I2S, 16 bit
      4'd7:    return {7'h08, 9'h000};                  // normal mode, 48 kHz
      default: return {7'h09, 9'h001};                  // active
    endcase
  endfunction

  // ---------------- bus sequencer ----------------
  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_STOP} state_e;

  state_e                      state;
  logic [$clog2(QDIV)-1:0]     qcnt;
  logic [1:0]                  quarter;
  logic [3:0]                  word_idx;
  logic [1:0]                  byte_idx;
  logic [3:0]                  bit_idx;    // 0..7 data (MSB first), 8 ack
  logic                        pending;
  logic [7:0]                  cur_byte;
  logic [15:0]                 cur_word;

  wire tick = (qcnt == ($clog2(QDIV))'(QDIV - 1));

  always_comb begin
    cur_word = cfg_word(word_idx, input_sel);
    case (byte_idx)
      2'd0:    cur_byte = DEV_ADDR;
      2'd1:    cur_byte = cur_word[15:8];
      default: cur_byte = cur_word[7:0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      qcnt      <= '0;
      quarter   <= '0;
      word_idx  <= '0;
      byte_idx  <= '0;
      bit_idx   <= '0;
      pending   <= 1'b1;          // configure once after reset
      scl       <= 1'b1;
      sda_oe    <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      ack_error <= 1'b0;
    end else begin
      if (start) pending <= 1'b1;
      qcnt <= tick ? '0 : qcnt + 1'b1;
      if (state == S_IDLE) begin
        scl     <= 1'b1;
        sda_oe  <= 1'b0;
        quarter <= '0;
        if (pending || start) begin
          pending   <= 1'b0;
          busy      <= 1'b1;
          done      <= 1'b0;
          ack_error <= 1'b0;
          word_idx  <= '0;
          state     <= S_START;
          qcnt      <= '0;
        end
      end else if (tick) begin
        quarter <= quarter + 1'b1;
        unique case (state)
          S_START: begin
            case (quarter)
              2'd0, 2'd1: begin scl <= 1'b1; sda_oe <= 1'b0; end
              2'd2:       sda_oe <= 1'b1;             // SDA falls, SCL high
              default: begin
                scl      <= 1'b0;
                byte_idx <= '0;
                bit_idx  <= '0;
                state    <= S_BIT;
              end
            endcase
          end
          S_BIT: begin
            case (quarter)
              2'd0: begin
                scl    <= 1'b0;
                sda_oe <= (bit_idx == 4'd8) ? 1'b0 : ~cur_byte[3'd7 - bit_idx[2:0]];
              end
              2'd1: scl <= 1'b1;
              2'd2: if (bit_idx == 4'd8 && sda_in) ack_error <= 1'b1;
              default: begin
                scl <= 1'b0;
                if (bit_idx == 4'd8) begin
                  bit_idx <= '0;
                  if (byte_idx == 2'd2) state <= S_STOP;
                  else                  byte_idx <= byte_idx + 1'b1;
                end else begin
                  bit_idx <= bit_idx + 1'b1;
                end
              end
            endcase
          end
          S_STOP: begin
            case (quarter)
              2'd0: begin scl <= 1'b0; sda_oe <= 1'b1; end
              2'd1: scl <= 1'b1;
              2'd2: sda_oe <= 1'b0;                   // SDA rises, SCL high
              default: begin
                if (word_idx == 4'(N_WORDS - 1)) begin
                  state <= S_IDLE;
                  busy  <= 1'b0;
                  done  <= 1'b1;
                end else begin
                  word_idx <= word_idx + 1'b1;
                  state    <= S_START;
                end
              end
            endcase
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
