// Behavioural model of the audio codec's ADC serial port as I2S bit-clock
// master. Runs from the testbench clock: BCLK has a period of 2*HALF clocks,
// a frame has 2*SLOT bit clocks, ADCLRCK is low for the left slot, and each
// 16-bit word starts one bit clock after the ADCLRCK change, MSB first,
// changing on falling BCLK. The words l_in/r_in are latched at the start of
// every frame (frame pulses then) and kept in l_sent/r_sent.
module i2s_codec_model #(
  parameter int HALF = 8,
  parameter int SLOT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] l_in,
  input  logic [15:0] r_in,
  output logic        bclk,
  output logic        lrck,
  output logic        dat,
  output logic        frame,
  output logic [15:0] l_sent,
  output logic [15:0] r_sent
);
  int half_cnt;
  int bitpos;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      half_cnt <= 0; bitpos <= 2*SLOT-1; bclk <= 1'b1; lrck <= 1'b1; dat <= 1'b0;
      frame <= 1'b0; l_sent <= '0; r_sent <= '0;
    end else begin
      frame <= 1'b0;
      if (half_cnt == HALF-1) begin
        half_cnt <= 0;
        bclk <= ~bclk;
        if (bclk) begin   // falling edge: advance one bit
          automatic int nb = (bitpos + 1) % (2*SLOT);
          automatic int k  = (nb % SLOT) - 1;
          automatic logic [15:0] w;
          if (nb == 0) begin
            l_sent <= l_in; r_sent <= r_in; frame <= 1'b1;
          end
          w = (nb < SLOT) ? ((nb == 0) ? l_in : l_sent) : r_sent;
          bitpos <= nb;
          lrck   <= (nb >= SLOT);
          dat    <= (k >= 0 && k < 16) ? w[15-k] : 1'b0;
        end
      end else begin
        half_cnt <= half_cnt + 1;
      end
    end
  end
endmodule
