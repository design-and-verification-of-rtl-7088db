// descrambler - 8-bit descrambler of the physical layer receiver.
//
// Runs the same LFSR as the scrambler (x^16+x^5+x^4+x^3+1, seed FFFF after
// reset, eight steps per byte) and XORs each received byte with the same
// mask, which restores the original byte as long as both ends have handled
// the same number of bytes since reset. Every received byte must therefore
// be passed through en, also a corrupted one.
//
// Interface: rst_n active low. Timing: data_out and out_valid are
// registered, one clock after en. Same polynomial choice as the scrambler.
module descrambler
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
  logic [7:0]  mask;

  assign mask = scr_mask(lfsr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr      <= SEED;
      data_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        data_out <= mask ^ inbyte;
        lfsr     <= scr_next(lfsr);
      end
    end
  end

endmodule
