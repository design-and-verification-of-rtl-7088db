// phy_rx - physical layer receiver: deserializer, even-parity checker,
// 10b/8b decoder and descrambler in a chain.
//
// Each SER_W-bit word from the deserializer carries one 11-bit
// {symbol, parity} word in its low bits. The parity checker tests the 11
// bits for even parity; odd parity raises phy_err for one clock. The symbol
// is then decoded and descrambled. Every word goes through the whole chain,
// a rejected one too, so the descrambler stays in step with the scrambler;
// out_err marks a byte whose parity failed or whose symbol had a code or
// disparity error, and the data link layer refuses the frame that holds it.
// Chain order follows the original design; passing flagged bytes on instead
// of dropping them is this design's choice.
//
// Interface: rst_n active low. Timing: out_byte/out_valid/out_err appear
// three clocks after the deserializer's par_ready (four after the last link
// bit); phy_err is a one-clock pulse two clocks after it.
module phy_rx #(
  parameter int unsigned SER_W = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ser_data,
  input  logic       ser_valid,
  output logic [7:0] out_byte,
  output logic       out_valid,
  output logic       out_err,
  output logic       phy_err
);

  logic [SER_W-1:0] word;
  logic             word_valid;
  logic [9:0]       sym_q;
  logic             pbit_unused, accept_unused, reject, chk_valid;
  logic [8:0]       dec_data;
  logic             dec_valid, code_err, disp_err, rd_unused;
  logic             rej_q;

  deserializer #(.WIDTH(SER_W)) u_des (
    .clk, .rst_n, .ser_data, .ser_valid, .par_data(word), .par_ready(word_valid)
  );

  parity_chk #(.WIDTH(11)) u_chk (
    .clk, .rst_n, .en(word_valid), .datai(word[10:0]),
    .parity_bit(pbit_unused), .accept_data(accept_unused), .reject_data(reject), .out_valid(chk_valid)
  );

  // symbol travels beside the parity checker; parity flag beside the decoder
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym_q   <= '0;
      rej_q   <= 1'b0;
      out_err <= 1'b0;
    end else begin
      if (word_valid) sym_q <= word[10:1];
      if (chk_valid)  rej_q <= reject;
      if (dec_valid)  out_err <= rej_q || code_err || disp_err;
    end
  end

  dec10b8b u_dec (
    .clk, .rst_n, .en(chk_valid), .datain(sym_q), .dataout(dec_data), .out_valid(dec_valid),
    .code_err, .disp_err, .dispout(rd_unused)
  );

  descrambler u_dscr (
    .clk, .rst_n, .en(dec_valid), .inbyte(dec_data[7:0]), .data_out(out_byte), .out_valid
  );

  assign phy_err = reject;

endmodule
