// enc8b10b - 8b/10b encoder of the physical layer transmitter.
//
// Each byte presented with en is coded into a DC-balanced 10-bit symbol: the
// low five bits through the 5b/6b table and the high three through the
// 3b/4b table, each sub-block taking its RD- or RD+ form from the running
// disparity, which is kept in a register (negative after reset). With k high
// the byte is coded as a control symbol (K28.0-K28.7, K23.7, K27.7, K29.7,
// K30.7). The symbol is held as {j,h,g,f,i,e,d,c,b,a}; data byte 00 at
// negative disparity becomes 0B9, the reference value of the original
// design. The code tables are the standard ones (see code8b10b_pkg).
//
// Interface: rst_n active low. Timing: dataout, dispout and out_valid are
// registered, one clock after en; dispout is the disparity after the symbol.
module enc8b10b
  import code8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       k,
  input  logic [7:0] data_in,
  output logic [9:0] dataout,
  output logic       out_valid,
  output logic       dispout
);

  logic [10:0] coded;

  assign coded = encode(dispout, k, data_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dataout   <= '0;
      dispout   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        dataout <= coded[9:0];
        dispout <= coded[10];
      end
    end
  end

endmodule
