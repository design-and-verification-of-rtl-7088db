// lcrc32 - 32-bit Link CRC generator of the data link layer, bit-serial.
//
// One bit (data_in) is absorbed per clock while enable is high, shifting the
// 32-bit register c through the PCIe CRC-32 polynomial 04C11DB7 (MSB-first
// form). init reloads the all-ones seed for the next frame. lcrc_out is c
// with the bits of each byte reversed, the mapping of the original design's
// output (c = 00000003 appears as lcrc_out = 000000c0). The polynomial and
// seed are not stated by the original design. The defaults are the PCIe LCRC
// values. POLY and SEED are parameters: the original waveform's register
// sequence 80000000 -> 00000001 -> 00000003, for input bits 0 then 1, is what
// POLY = 00000001 (x^32 + 1) with SEED = 80000000 gives.
//
// Interface: rst_n active low; init has priority over enable. Timing: c and
// lcrc_out reflect every bit absorbed up to the previous clock edge, so a
// byte takes eight clocks.
module lcrc32
  import pcie_pkg::*;
#(
  parameter logic [31:0] POLY = CRC_POLY,
  parameter logic [31:0] SEED = CRC_SEED
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        init,
  input  logic        data_in,
  output logic [31:0] c,
  output logic [31:0] lcrc_out
);

  always_ff @(posedge clk) begin
    if (!rst_n || init) c <= SEED;
    else if (enable)    c <= {c[30:0], 1'b0} ^ ((c[31] ^ data_in) ? POLY : 32'h0);
  end

  always_comb begin
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++)
        lcrc_out[8*b + i] = c[8*b + 7 - i];
  end

endmodule
