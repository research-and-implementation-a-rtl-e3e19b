// Sine look-up table ("sine_table" block): one full cycle of a sinusoid in
// DEPTH samples of WIDTH bits, signed two's complement.
//
// Entry i holds round(2047 * sin(2*pi*i/512)) for the default 512 x 12-bit
// table, read from sine_table.hex (the file is made from exactly that
// formula; the amplitude 2047 keeps the table symmetric). The size follows
// the published design; the amplitude, the signed coding and the
// registered (synchronous ROM) output are choices of this implementation.
//
// Interface: addr is sampled on the rising clock edge and data holds the
// table entry one clock later.
module sine_table #(
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned WIDTH     = 12,
  parameter string       INIT_FILE = "rtl/sine_table.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic signed [WIDTH-1:0]  data
);

  logic [WIDTH-1:0] rom [DEPTH];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) data <= signed'(rom[addr]);

endmodule
