// hdr_trl_fifo - header/trailer packet buffer of the transaction layer.
//
// A 32-bit user word is broken into bytes and stored, together with a
// header byte before it and the trailer byte after it, in a FIFO of DEPTH
// entries of WIDTH bits (6 x 8 by default): entry 0 = header, entries 1..4
// = data[7:0], data[15:8], data[23:16], data[31:24], entry 5 = trailer.
// The whole packet is written in one clock (load); bytes are read one per
// pop from the read pointer. The entries stay until the next load, so
// rewind can move the read pointer back to the header to send the same
// packet again after a negative acknowledge.
//
// Timing: dout shows the entry at the read pointer combinationally; load,
// pop and rewind act at the clock edge (load wins, then rewind). empty is
// high once every entry has been popped. The 6 x 8 organisation and byte
// order follow the original design; single-clock loading and rewind are
// this design's choices.
module hdr_trl_fifo
  import pcie_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 6
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load,
  input  logic [WIDTH-1:0]             hdr,
  input  logic [(DEPTH-2)*WIDTH-1:0]   data,
  input  logic                         pop,
  input  logic                         rewind,
  output logic [WIDTH-1:0]             dout,
  output logic                         empty
);

  localparam int unsigned PW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= PW'(DEPTH);
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (load) begin
      mem[0] <= hdr;
      for (int i = 1; i < DEPTH - 1; i++) mem[i] <= data[(i-1)*WIDTH +: WIDTH];
      mem[DEPTH-1] <= WIDTH'(TRAILER);
      rd_ptr <= '0;
    end else if (rewind) begin
      rd_ptr <= '0;
    end else if (pop && !empty) begin
      rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assign empty = (rd_ptr == PW'(DEPTH));
  assign dout  = empty ? '0 : mem[rd_ptr[$clog2(DEPTH)-1:0]];

endmodule
