// scrambler - 8-bit data scrambler of the physical layer transmitter.
//
// Each byte presented with en is XORed with eight successive output bits of
// a 16-bit Galois LFSR with polynomial x^16+x^5+x^4+x^3+1, and the LFSR then
// advances eight steps. Byte bit 0 meets the first LFSR output. The LFSR is
// seeded with FFFF at reset, so the first masks are FF, 17, C0, 14, B2, E7:
// the byte sequence AA, FF, 55, 55, 55, 55 becomes 55, E8, 95, 41, E7, B2,
// which reproduces the reference waveform of the original design. The
// polynomial is not named by the original design and is taken to be the one
// of the 2.5/5 GT/s PCIe links, which those reference values match.
//
// Interface: rst_n active low. Timing: data_out and out_valid are
// registered, one clock after en.
module scrambler
  import pcie_pkg::*;
#(
  parameter logic [15:0] SEED = SCR_SEED
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] inbyte,
  output logic [7:0] data_out,
  output logic       out_valid
);

  logic [15:0] lfsr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr      <= SEED;
      data_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        data_out <= inbyte ^ scr_mask(lfsr);
        lfsr     <= scr_next(lfsr);
      end
    end
  end

endmodule
