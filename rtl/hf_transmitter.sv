// HF (short-wave, 3-30 MHz) DSB-SC / SSB transmitter, the FPGA part.
//
// Audio from the codec (microphone or line input) arrives as I2S serial
// data, is packed into 16-bit samples, modulates a carrier made by a
// 9-bit step counter and a 512-entry sine table running on the 50 MHz
// clock (f = 50e6*step/512), passes a 60-tap low-pass FIR that removes
// harmonics, and leaves as 12-bit offset-binary words for a DAC902 on the
// GPIO header. The embedded Linux host sets the carrier step, the
// modulation mode (DSB or Weaver SSB), the codec input and the DAC enable
// through an AXI4-Lite register block; the codec itself is configured over
// its two-wire control bus.
//
// Structure, widths, rates and the 18.066 MHz example carrier follow the
// published design. Which codec channel is used (left), the register map,
// codec configuration values and the SSB method details are choices of
// this implementation; they are documented in the sub-blocks.
//
// Ports: CLOCK_50 and active-low synchronous reset, AXI4-Lite slave from
// the host bridge, codec pins (AUD_*, I2C_*), DAC pins (DAC_*).
module hf_transmitter
  import tx_pkg::*;
(
  input  logic             CLOCK_50,
  input  logic             rst_n,
  // host AXI4-Lite
  input  logic [7:0]       s_awaddr,
  input  logic             s_awvalid,
  output logic             s_awready,
  input  logic [31:0]      s_wdata,
  input  logic [3:0]       s_wstrb,
  input  logic             s_wvalid,
  output logic             s_wready,
  output logic [1:0]       s_bresp,
  output logic             s_bvalid,
  input  logic             s_bready,
  input  logic [7:0]       s_araddr,
  input  logic             s_arvalid,
  output logic             s_arready,
  output logic [31:0]      s_rdata,
  output logic [1:0]       s_rresp,
  output logic             s_rvalid,
  input  logic             s_rready,
  // audio codec
  output logic             AUD_XCK,
  input  logic             AUD_BCLK,
  input  logic             AUD_ADCLRCK,
  input  logic             AUD_ADCDAT,
  output logic             I2C_SCLK,
  output logic             I2C_SDAT_OE,   // 1: pull SDA low
  input  logic             I2C_SDAT_IN,
  // DAC902
  output logic [DAC_W-1:0] DAC_D,
  output logic             DAC_CLK,
  output logic             DAC_PD
);

  phase_t    carrier_step, lo_step;
  mod_mode_e mode;
  logic      input_sel, codec_start, dac_enable;
  logic      codec_busy, codec_done, codec_ack_error;
  audio_t    sample_l;
  logic      sample_valid;
  hf_t       hf_sample;

  ctrl_regs u_regs (
    .clk(CLOCK_50), .rst_n(rst_n),
    .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready),
    .wdata(s_wdata), .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready),
    .bresp(s_bresp), .bvalid(s_bvalid), .bready(s_bready),
    .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready),
    .carrier_step(carrier_step), .mode(mode), .lo_step(lo_step),
    .input_sel(input_sel), .codec_start(codec_start), .dac_enable(dac_enable),
    .codec_done(codec_done), .codec_ack_error(codec_ack_error), .codec_busy(codec_busy));

  audio_control u_audio_ctrl (
    .clk(CLOCK_50), .rst_n(rst_n), .start(codec_start), .input_sel(input_sel),
    .xck(AUD_XCK), .scl(I2C_SCLK), .sda_oe(I2C_SDAT_OE), .sda_in(I2C_SDAT_IN),
    .busy(codec_busy), .done(codec_done), .ack_error(codec_ack_error));

  adc_reader u_adc (
    .clk(CLOCK_50), .rst_n(rst_n),
    .bclk(AUD_BCLK), .adclrck(AUD_ADCLRCK), .adcdat(AUD_ADCDAT),
    .sample_l(sample_l), .sample_r(), .valid(sample_valid));   // right unused

  // mono voice: the left channel is transmitted
  audio_modulation u_mod (
    .clk(CLOCK_50), .rst_n(rst_n),
    .step(carrier_step), .lo_step(lo_step), .mode(mode),
    .audio(sample_l), .audio_valid(sample_valid),
    .dac_data(hf_sample));

  dac902_if u_dac (
    .clk(CLOCK_50), .rst_n(rst_n), .enable(dac_enable), .data(hf_sample),
    .dac_d(DAC_D), .dac_clk(DAC_CLK), .dac_pd(DAC_PD));

endmodule
