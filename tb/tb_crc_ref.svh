// tb_crc_ref.svh - reference CRC-32 for the testbenches, computed by
// polynomial long division (independent of the shift-register form in the
// design): the message bits, with the seed XORed into the first 32, are
// multiplied by x^32 and divided by x^32 + 04C11DB7; the remainder is the CRC.
function automatic logic [31:0] ref_crc_bits(input logic [31:0] seed, input logic [223:0] msg,
                                             input int nbits);
  logic [255:0] r;
  r = '0;
  for (int i = 0; i < nbits; i++) r[32 + i] = msg[i];
  for (int i = 0; i < 32; i++) r[32 + nbits - 1 - i] ^= seed[31 - i];
  for (int i = 32 + nbits - 1; i >= 32; i--)
    if (r[i]) r[i -: 33] ^= {1'b1, 32'h04C1_1DB7};
  return r[31:0];
endfunction

// bytes b[0..n-1], each sent most significant bit first
function automatic logic [31:0] ref_crc_bytes(input logic [31:0] seed, input logic [7:0] b [],
                                              input int n);
  logic [223:0] m;
  m = '0;
  for (int k = 0; k < n; k++)
    for (int j = 0; j < 8; j++) m[8*n - 1 - (8*k + (7 - j))] = b[k][j];
  return ref_crc_bits(seed, m, 8*n);
endfunction

function automatic logic [31:0] byte_rev(input logic [31:0] c);
  logic [31:0] r;
  for (int b = 0; b < 4; b++) for (int i = 0; i < 8; i++) r[8*b + i] = c[8*b + 7 - i];
  return r;
endfunction
