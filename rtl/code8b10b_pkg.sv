// code8b10b_pkg - code tables of the 8b/10b line code, shared by the encoder
// (enc8b10b) and the decoder (dec10b8b).
//
// A byte HGF_EDCBA is split into a 5-bit part EDCBA, coded to six bits
// abcdei, and a 3-bit part HGF, coded to four bits fghj. Each table entry is
// the code used when the running disparity (RD) is negative; the RD-positive
// code is its complement for the unbalanced codes and for the two balanced
// codes that exist in both polarities (D.7 = 111000/000111, D.x.3 =
// 1100/0011). The ten bits leave in the order a b c d e i f g h j and are
// held in a vector as {j,h,g,f,i,e,d,c,b,a}, which is the ordering in which
// the data byte 00 with negative RD is the symbol 0B9. The tables are the
// standard Widmer-Franaszek code; the bit ordering is this design's.
package code8b10b_pkg;

  // 5b/6b, RD- column, written abcdei (a is bit 5)
  function automatic logic [5:0] code6_neg(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  localparam logic [5:0] K28_NEG = 6'b001111;

  // 3b/4b for data, RD- column, written fghj (f is bit 3); 7 is the primary P7
  function automatic logic [3:0] code4_neg(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  localparam logic [3:0] A7_NEG = 4'b0111;  // alternate D.x.7 / K.x.7

  // Does the RD+ code differ from the RD- code (complemented)?
  function automatic logic flips6(input logic [5:0] c);
    return ($countones(c) != 3) || (c == 6'b111000);
  endfunction

  function automatic logic flips4(input logic [3:0] c);
    return ($countones(c) != 2) || (c == 4'b1100);
  endfunction

  // Disparity after a sub-block: unbalanced codes set it to their sign.
  function automatic logic rd_after6(input logic rd, input logic [5:0] c);
    return ($countones(c) == 3) ? rd : ($countones(c) > 3);
  endfunction

  function automatic logic rd_after4(input logic rd, input logic [3:0] c);
    return ($countones(c) == 2) ? rd : ($countones(c) > 2);
  endfunction

  // Pack {abcdei, fghj} into the held order {j,h,g,f,i,e,d,c,b,a}.
  function automatic logic [9:0] pack10(input logic [5:0] c6, input logic [3:0] c4);
    logic [9:0] t, r;
    t = {c6, c4};
    for (int i = 0; i < 10; i++) r[i] = t[9-i];
    return r;
  endfunction

  // Encode one symbol; rd is the running disparity before it (1 = positive).
  function automatic logic [10:0] encode(input logic rd, input logic k, input logic [7:0] d);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6, rd4, use_a7;
    x = d[4:0];
    y = d[7:5];
    c6 = (k && x == 5'd28) ? K28_NEG : code6_neg(x);
    if (rd && flips6(c6)) c6 = ~c6;
    rd6 = rd_after6(rd, c6);
    use_a7 = k || (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20))
                || ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    if (y == 3'd7 && use_a7) c4 = A7_NEG;
    else                     c4 = code4_neg(y);
    if (rd6 && flips4(c4)) c4 = ~c4;
    // balanced control sub-blocks K28.1/.2/.5/.6 take the opposite polarity
    if (k && x == 5'd28 && !rd6 && (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6)) c4 = ~c4;
    rd4 = rd_after4(rd6, c4);
    return {rd4, pack10(c6, c4)};
  endfunction

endpackage
