// Audio ADC serial-data reader ("adcReader" block).
//
// The audio codec is the bit-clock master: it drives BCLK, the frame clock
// ADCLRCK and the serial data ADCDAT. This block samples all three with the
// 50 MHz system clock through two-flop synchronisers, detects rising BCLK
// edges, and shifts ADCDAT in MSB first. Following the I2S format, the first
// bit of a word is the one on the second rising BCLK edge after ADCLRCK
// changes (the first edge carries the last bit of the previous word), and
// ADCLRCK low marks the left channel. After SAMPLE_W bits the word is
// stored; when a right word completes, both channels are presented and
// valid pulses for one clock.
//
// Packing serial codec data into 16-bit samples under BCLK and ADCLRCK
// follows the published design; the I2S framing, the codec-as-master
// arrangement, oversampling with the system clock and the one-pulse valid
// are choices of this implementation. BCLK must be at most 1/4 of clk.
module adc_reader #(
  parameter int unsigned SAMPLE_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       bclk,
  input  logic                       adclrck,
  input  logic                       adcdat,
  output logic signed [SAMPLE_W-1:0] sample_l,
  output logic signed [SAMPLE_W-1:0] sample_r,
  output logic                       valid
);

  localparam int unsigned CNT_W = $clog2(SAMPLE_W + 2);

  logic [2:0] bclk_s;                  // [0],[1] synchroniser, [2] previous
  logic [1:0] lrck_s, dat_s;           // two-flop synchronisers
  logic       lrck_q;                  // LRCK seen at the last BCLK edge
  logic [CNT_W-1:0]    bit_cnt;
  logic [SAMPLE_W-1:0] shift;
  logic [SAMPLE_W-1:0] left_q;

  wire bclk_rise = bclk_s[1] & ~bclk_s[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bclk_s   <= '0;
      lrck_s   <= '0;
      dat_s    <= '0;
      lrck_q   <= 1'b0;
      bit_cnt  <= CNT_W'(SAMPLE_W);
      shift    <= '0;
      left_q   <= '0;
      sample_l <= '0;
      sample_r <= '0;
      valid    <= 1'b0;
    end else begin
      bclk_s <= {bclk_s[1:0], bclk};
      lrck_s <= {lrck_s[0], adclrck};
      dat_s  <= {dat_s[0], adcdat};
      valid  <= 1'b0;
      if (bclk_rise) begin
        lrck_q <= lrck_s[1];
        if (lrck_s[1] != lrck_q) begin
          // one-bit I2S delay: this edge still belongs to the old word
          bit_cnt <= '0;
        end else if (bit_cnt < CNT_W'(SAMPLE_W)) begin
          shift   <= {shift[SAMPLE_W-2:0], dat_s[1]};
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == CNT_W'(SAMPLE_W - 1)) begin
            // last bit of the word arrives on this edge
            if (!lrck_q) begin
              left_q <= {shift[SAMPLE_W-2:0], dat_s[1]};
            end else begin
              sample_l <= left_q;
              sample_r <= {shift[SAMPLE_W-2:0], dat_s[1]};
              valid    <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
