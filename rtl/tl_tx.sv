// tl_tx - transaction layer transmitter.
//
// Takes one 32-bit word per packet from the user (data_in with data_valid,
// while tx_ready is high) and builds a Transaction Layer Packet of TLP_BYTES
// = 10 bytes: header (FA for a request, AF for a completion), the four data
// bytes least significant first, the four bytes of the 32-bit ECRC of the
// word (most significant first), and the trailer 77. Header, data and
// trailer come from the 6 x 8 header/trailer FIFO; the ECRC from ecrc32,
// computed in the clock in which the word is accepted. The bytes leave one
// per tlp_valid/tlp_ready handshake.
//
// Packets are sent stop-and-wait: after the last byte the transmitter waits
// for the receiver's verdict. pkt_ack releases the packet and raises
// tx_ready again; pkt_nack rewinds the FIFO and sends the same TLP again.
// The corrupt input, sampled with the word, flips bit 0 of the first data
// byte of the first transmission only, after the ECRC was computed: a test
// hook that produces an end-to-end error. Header/trailer values, the FIFO
// and the ECRC follow the original design; the byte layout, the
// stop-and-wait replay and the test hook are this design's choices.
//
// Interface: rst_n active low. Timing: the header is offered the clock
// after the word is accepted.
module tl_tx
  import pcie_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] data_in,
  input  logic        data_valid,
  input  logic        is_cpl,
  input  logic        corrupt,
  output logic        tx_ready,
  output logic [7:0]  tlp_byte,
  output logic        tlp_valid,
  input  logic        tlp_ready,
  input  logic        pkt_ack,
  input  logic        pkt_nack
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT} state_t;

  state_t      state;
  logic [3:0]  idx;
  logic        corrupt_q;
  logic        accept, fire;
  logic        fifo_pop, fifo_rewind, fifo_empty;
  logic [7:0]  fifo_dout;
  logic [31:0] ecrc;
  logic [7:0]  raw;

  assign tx_ready    = (state == S_IDLE);
  assign accept      = tx_ready && data_valid;
  assign tlp_valid   = (state == S_SEND);
  assign fire        = tlp_valid && tlp_ready;
  assign fifo_pop    = fire && (idx < 4'(TLP_ECRC) || idx == 4'(TLP_TRL));
  assign fifo_rewind = (state == S_WAIT) && pkt_nack;

  hdr_trl_fifo #(.WIDTH(8), .DEPTH(6)) u_fifo (
    .clk, .rst_n, .load(accept), .hdr(is_cpl ? HDR_CPL : HDR_REQ), .data(data_in),
    .pop(fifo_pop), .rewind(fifo_rewind), .dout(fifo_dout), .empty(fifo_empty)
  );

  ecrc32 #(.DATA_W(32)) u_ecrc (
    .clk, .rst_n, .ecrc_init((state == S_IDLE && !accept) || (state == S_WAIT && pkt_ack)), .ecrc_en(accept),
    .data_in, .ecrc_out(ecrc)
  );

  always_comb begin
    if (idx >= 4'(TLP_ECRC) && idx < 4'(TLP_TRL)) raw = ecrc[8*(3 - (idx - 4'(TLP_ECRC))) +: 8];
    else                                           raw = fifo_dout;
    tlp_byte = raw ^ {7'b0, corrupt_q && idx == 4'(TLP_DATA)};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      corrupt_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          corrupt_q <= corrupt;
          idx       <= '0;
          state     <= S_SEND;
        end
        S_SEND: if (fire) begin
          if (idx == 4'(TLP_BYTES - 1)) state <= S_WAIT;
          else                          idx   <= idx + 1'b1;
        end
        S_WAIT: begin
          if (pkt_ack) begin
            state <= S_IDLE;
          end else if (pkt_nack) begin
            corrupt_q <= 1'b0;
            idx       <= '0;
            state     <= S_SEND;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the FIFO holds exactly the header, data and trailer of a packet
  assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |-> !fifo_empty);

endmodule
