// pcie_pkg - constants and pure functions shared by the PCIe 3.0 soft-IP
// transmitter and receiver.
//
// The header and trailer bytes are illustrative packet markers: FA marks a
// resource request, AF a completion, and 77 closes every packet. The CRC
// polynomial and seed are those of the PCIe CRC-32 (04C11DB7, all ones); the
// scrambler step is the x^16+x^5+x^4+x^3+1 LFSR of the 8b/10b-coded PCIe
// links, advanced eight bits per byte. The header/trailer values follow the
// original specification table; the frame layout constants below are this
// design's own choices (see README).
package pcie_pkg;

  // Packet markers
  localparam logic [7:0] HDR_REQ = 8'hFA;  // resource request header
  localparam logic [7:0] HDR_CPL = 8'hAF;  // completion header
  localparam logic [7:0] TRAILER = 8'h77;  // trailer of every packet

  // CRC-32 (ECRC and LCRC)
  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_SEED = 32'hFFFF_FFFF;

  // Scrambler
  localparam logic [15:0] SCR_SEED = 16'hFFFF;
  localparam logic [15:0] SCR_TAPS = 16'h0039;  // x^5 + x^4 + x^3 + 1

  // Frame layout: header, 4 data bytes, 4 ECRC bytes, trailer = TLP;
  // the data link layer appends 4 LCRC bytes.
  localparam int unsigned DATA_BYTES = 4;
  localparam int unsigned CRC_BYTES  = 4;
  localparam int unsigned TLP_BYTES  = 1 + DATA_BYTES + CRC_BYTES + 1;  // 10
  localparam int unsigned FRAME_BYTES = TLP_BYTES + CRC_BYTES;          // 14

  // Byte positions inside a TLP
  localparam int unsigned TLP_HDR  = 0;
  localparam int unsigned TLP_DATA = 1;  // data_in[7:0] first
  localparam int unsigned TLP_ECRC = 5;  // ECRC[31:24] first
  localparam int unsigned TLP_TRL  = 9;

  typedef logic [7:0] byte_t;
  typedef byte_t tlp_t [TLP_BYTES];

  // One CRC-32 step over a single bit, MSB-first (non-reflected) form.
  function automatic logic [31:0] crc32_bit(input logic [31:0] crc, input logic d);
    logic fb;
    fb = crc[31] ^ d;
    return {crc[30:0], 1'b0} ^ (fb ? CRC_POLY : 32'h0);
  endfunction

  // CRC-32 over a 32-bit word, most significant bit first.
  function automatic logic [31:0] crc32_word(input logic [31:0] crc, input logic [31:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) c = crc32_bit(c, d[i]);
    return c;
  endfunction

  // Eight scrambler steps: mask bit i is LFSR bit 15 before step i, so the
  // byte's bit 0 meets the first LFSR output.
  function automatic logic [7:0] scr_mask(input logic [15:0] lfsr);
    logic [15:0] l;
    logic [7:0]  m;
    l = lfsr;
    for (int i = 0; i < 8; i++) begin
      m[i] = l[15];
      l    = {l[14:0], 1'b0} ^ (l[15] ? SCR_TAPS : 16'h0);
    end
    return m;
  endfunction

  function automatic logic [15:0] scr_next(input logic [15:0] lfsr);
    logic [15:0] l;
    l = lfsr;
    for (int i = 0; i < 8; i++) l = {l[14:0], 1'b0} ^ (l[15] ? SCR_TAPS : 16'h0);
    return l;
  endfunction

endpackage
