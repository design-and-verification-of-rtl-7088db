// parity_gen - even-parity generator of the physical layer transmitter.
//
// Appends one bit to each encoded symbol so that the WIDTH+1 bits together
// hold an even number of ones: datao = {datai, ^datai}, the data in the
// upper bits and the parity bit in bit 0, as in the original design's
// {DATA, 1 BIT PARITY}. WIDTH defaults to the 10-bit 8b/10b symbol.
//
// Interface: rst_n active low. Timing: datao and out_valid are registered,
// one clock after en.
module parity_gen #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] datai,
  output logic [WIDTH:0]   datao,
  output logic             out_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      datao     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) datao <= {datai, ^datai};
    end
  end

endmodule
