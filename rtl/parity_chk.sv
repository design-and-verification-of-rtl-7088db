// parity_chk - even-parity checker of the physical layer receiver.
//
// parity_bit is the XOR of all WIDTH received bits. A word with even parity
// (parity_bit = 0) raises accept_data and may go on to the decoder; a word
// with odd parity raises reject_data, which the receiver reports as phy_err.
// For example 11100101 (five ones) gives parity_bit = 1 and reject_data = 1.
// Port names follow the original design; WIDTH defaults to its 8 bits and
// the receiver uses 11 (symbol plus parity bit).
//
// Interface: rst_n active low. Timing: all outputs are registered, one clock
// after en; accept_data and reject_data are low while out_valid is low.
module parity_chk #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] datai,
  output logic             parity_bit,
  output logic             accept_data,
  output logic             reject_data,
  output logic             out_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      parity_bit  <= 1'b0;
      accept_data <= 1'b0;
      reject_data <= 1'b0;
      out_valid   <= 1'b0;
    end else begin
      out_valid   <= en;
      accept_data <= en && !(^datai);
      reject_data <= en &&  (^datai);
      if (en) parity_bit <= ^datai;
    end
  end

endmodule
