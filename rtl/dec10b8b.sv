// dec10b8b - 10b/8b decoder of the physical layer receiver.
//
// Splits the received symbol {j,h,g,f,i,e,d,c,b,a} into its 6-bit and 4-bit
// sub-blocks and looks each up in both disparity columns of the 8b/10b code
// tables (code8b10b_pkg). dataout is {K, HGFEDCBA}: bit 8 is high for a
// control symbol (K28.x, or K23/27/29/30.7). code_err flags a sub-block that
// is in no table (or an alternate D.x.7 used for a byte that has none);
// disp_err flags a sub-block whose polarity does not match the running
// disparity. The running disparity is kept in a register, negative after
// reset, and is updated from the received bits, so it recovers by itself
// after a corrupted symbol. The symbol 0B9 decodes to 000, as in the
// original design.
//
// Interface: rst_n active low. Timing: all outputs are registered, one clock
// after en; dispout is the running disparity after the symbol.
module dec10b8b
  import code8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [9:0] datain,
  output logic [8:0] dataout,
  output logic       out_valid,
  output logic       code_err,
  output logic       disp_err,
  output logic       dispout
);

  logic [5:0] c6;
  logic [3:0] c4, c4d;
  logic [4:0] x;
  logic [2:0] y;
  logic       hit6, hit4, k28, a7, kflag, a7_ok, rd6, rd4, derr, cerr;

  always_comb begin
    c6 = {datain[0], datain[1], datain[2], datain[3], datain[4], datain[5]};
    c4 = {datain[6], datain[7], datain[8], datain[9]};

    // 5b/6b look-up in both columns
    x    = '0;
    hit6 = 1'b0;
    k28  = (c6 == K28_NEG) || (c6 == ~K28_NEG);
    if (k28) begin
      x    = 5'd28;
      hit6 = 1'b1;
    end
    for (int i = 0; i < 32; i++) begin
      if (c6 == code6_neg(5'(i)) || (flips6(code6_neg(5'(i))) && c6 == ~code6_neg(5'(i)))) begin
        x    = 5'(i);
        hit6 = 1'b1;
      end
    end

    // 3b/4b look-up; after the RD+ form of K28 the balanced codes swap
    c4d  = (c6 == ~K28_NEG) ? ~c4 : c4;
    y    = '0;
    hit4 = 1'b0;
    a7   = (c4d == A7_NEG) || (c4d == ~A7_NEG);
    if (a7) begin
      y    = 3'd7;
      hit4 = 1'b1;
    end
    for (int i = 0; i < 8; i++) begin
      if (c4d == code4_neg(3'(i)) || (flips4(code4_neg(3'(i))) && c4d == ~code4_neg(3'(i)))) begin
        y    = 3'(i);
        hit4 = 1'b1;
      end
    end

    kflag = k28 || (a7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
    a7_ok = !a7 || kflag || x == 5'd11 || x == 5'd13 || x == 5'd14
                         || x == 5'd17 || x == 5'd18 || x == 5'd20;
    cerr  = !hit6 || !hit4 || !a7_ok;

    // disparity: an RD- sub-block may not be negative, an RD+ one not positive
    derr = 1'b0;
    if (!dispout && ($countones(c6) < 3 || c6 == 6'b000111)) derr = 1'b1;
    if ( dispout && ($countones(c6) > 3 || c6 == 6'b111000)) derr = 1'b1;
    rd6 = rd_after6(dispout, c6);
    if (!rd6 && ($countones(c4) < 2 || c4 == 4'b0011)) derr = 1'b1;
    if ( rd6 && ($countones(c4) > 2 || c4 == 4'b1100)) derr = 1'b1;
    rd4 = rd_after4(rd6, c4);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dataout   <= '0;
      out_valid <= 1'b0;
      code_err  <= 1'b0;
      disp_err  <= 1'b0;
      dispout   <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        dataout  <= {kflag, y, x};
        code_err <= cerr;
        disp_err <= derr;
        dispout  <= rd4;
      end
    end
  end

endmodule
