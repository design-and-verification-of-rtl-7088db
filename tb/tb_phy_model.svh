// tb_phy_model.svh - transmit-side model for the physical layer
// testbenches: scrambler (16-bit LFSR, output s[15] fed back into bits 0, 3,
// 4 and 5, seed FFFF), 8b/10b code from code8b10b_pkg, even parity in bit 0,
// zero-extended to the 16-bit link word.
function automatic logic [15:0] model_word(inout logic [15:0] s, inout logic rd, input logic [7:0] d);
  logic [10:0] e;
  logic [9:0]  sym;
  logic [7:0]  sc;
  logic [15:0] st;
  bit p, o;
  st = s;
  for (int i = 0; i < 8; i++) begin
    o = st[15]; sc[i] = d[i] ^ o;
    st = {st[14:5], st[4] ^ o, st[3] ^ o, st[2] ^ o, st[1:0], o};
  end
  s = st;
  e = code8b10b_pkg::encode(rd, 1'b0, sc);
  rd = e[10]; sym = e[9:0];
  p = 0; for (int i = 0; i < 10; i++) p ^= sym[i];
  return {5'b0, sym, p};
endfunction
