// Output port to the DAC902 12-bit high-speed DAC on the GPIO header.
//
// Each clock the signed HF sample is registered and converted to the DAC's
// offset-binary input code (sign bit inverted: -2048 -> 0x000, 0 -> 0x800,
// +2047 -> 0xFFF). The DAC clock is the inverted system clock, so the DAC
// latches on the rising dac_clk edge in the middle of each data word. When
// enable is low the data is held at mid-scale and the DAC's power-down pin
// is driven high.
//
// A 12-bit data bus plus clock to the DAC follows the published design;
// the coding, the clock phase and the enable/power-down control are choices
// of this implementation.
//
// Timing: dac_d shows a sample one clock after data.
module dac902_if
  import tx_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  hf_t              data,
  output logic [DAC_W-1:0] dac_d,
  output logic             dac_clk,
  output logic             dac_pd
);

  localparam logic [DAC_W-1:0] MID = {1'b1, {(DAC_W-1){1'b0}}};

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      dac_d  <= MID;
      dac_pd <= 1'b1;
    end else begin
      dac_d  <= {~data[DAC_W-1], data[DAC_W-2:0]};
      dac_pd <= 1'b0;
    end
  end

  assign dac_clk = ~clk;

endmodule
