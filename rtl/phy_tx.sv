// phy_tx - physical layer transmitter: scrambler, 8b/10b encoder, parity
// generator and serializer in a chain.
//
// A byte accepted on in_valid/in_ready is scrambled, encoded into a 10-bit
// symbol, extended by an even-parity bit to 11 bits and handed to the
// SER_W-bit serializer, which sends it on ser_data one bit per clock under
// ser_valid. The 11-bit word sits in the low bits of the serializer word,
// upper bits zero. One byte is in the chain at a time: a byte is accepted only
// while the serializer is sending its last bit or idle, and in_ready stays
// low until that byte has been loaded and sent, so a byte occupies SER_W
// link clocks plus three idle ones. The chain order
// follows the original design; the zero-extension from 11 to 16 bits and the
// handshake are this design's choices.
//
// Interface: rst_n active low. Timing: the first link bit of a byte leaves
// four clocks after it is accepted (three register stages plus the load).
module phy_tx #(
  parameter int unsigned SER_W = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_byte,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       ser_data,
  output logic       ser_valid
);

  logic       busy;
  logic       accept;
  logic [7:0] scr_byte;
  logic       scr_valid;
  logic [9:0] sym;
  logic       sym_valid;
  logic       rd_unused;
  logic [10:0] sym_par;
  logic       par_valid;
  logic       ser_ready;

  assign in_ready = !busy && ser_ready;
  assign accept   = in_valid && in_ready;

  // a byte is in flight from acceptance until the serializer takes it
  always_ff @(posedge clk) begin
    if (!rst_n)         busy <= 1'b0;
    else if (accept)    busy <= 1'b1;
    else if (par_valid) busy <= 1'b0;
  end

  scrambler u_scr (
    .clk, .rst_n, .en(accept), .inbyte(in_byte), .data_out(scr_byte), .out_valid(scr_valid)
  );

  enc8b10b u_enc (
    .clk, .rst_n, .en(scr_valid), .k(1'b0), .data_in(scr_byte),
    .dataout(sym), .out_valid(sym_valid), .dispout(rd_unused)
  );

  parity_gen #(.WIDTH(10)) u_par (
    .clk, .rst_n, .en(sym_valid), .datai(sym), .datao(sym_par), .out_valid(par_valid)
  );

  serializer #(.WIDTH(SER_W)) u_ser (
    .clk, .rst_n, .par_data(SER_W'(sym_par)), .load(par_valid), .ready(ser_ready),
    .ser_data, .ser_valid
  );

  // the serializer is idle whenever a byte reaches it
  assert property (@(posedge clk) disable iff (!rst_n) par_valid |-> ser_ready);

endmodule
