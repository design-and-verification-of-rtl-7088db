// pcie_v3 - PCIe 3.0 soft IP top: a transmitter and a receiver, each with a
// transaction, a data link and a physical layer, joined by a serial link.
//
// Transmit path: tl_tx wraps a 32-bit user word into a TLP (header, data,
// ECRC, trailer); dl_tx appends the LCRC; phy_tx scrambles, 8b/10b-encodes,
// adds an even-parity bit and serializes each byte. Receive path: phy_rx
// deserializes, checks parity (phy_err), decodes and descrambles; dl_rx
// checks the LCRC (ack_dl / nack_dl); tl_rx checks the ECRC (ack_tl /
// nack_tl) and delivers data_out. The receiver's verdict goes back to the
// transmitter: ack_tl releases the packet, nack_dl or nack_tl makes it send
// the same TLP again. The layering, the checks and the port names of the
// original block diagram follow the original design. data_valid, tx_ready,
// data_out_valid, is_cpl/rx_is_cpl and the two test inputs are this
// design's additions: link_flip inverts the bit on the serial link while it
// is high (a link error), tl_corrupt, sampled with the word, damages the
// TLP after its ECRC was computed (an end-to-end error).
//
// Interface: clk (100 MHz in the original design), rst_n active low; a word
// is accepted when data_valid and tx_ready are both high. Timing: an
// error-free packet of 14 bytes takes about 14 x 19 link clocks plus the
// pipeline, about 300 clocks from data_in to data_out; every status output
// is a one-clock pulse.
module pcie_v3
  import pcie_pkg::*;
#(
  parameter int unsigned SER_W = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] data_in,
  input  logic        data_valid,
  input  logic        is_cpl,
  output logic        tx_ready,
  output logic [31:0] data_out,
  output logic        data_out_valid,
  output logic        rx_is_cpl,
  output logic        ack_tl,
  output logic        nack_tl,
  output logic        ack_dl,
  output logic        nack_dl,
  output logic        phy_err,
  input  logic        link_flip,
  input  logic        tl_corrupt
);

  // transaction -> data link (transmitter)
  logic [7:0] tlp_byte;
  logic       tlp_valid, tlp_ready;
  // data link -> physical (transmitter)
  logic [7:0] frm_byte;
  logic       frm_valid, frm_ready;
  // physical link
  logic       tx_ser, tx_ser_valid, rx_ser;
  // physical -> data link (receiver)
  logic [7:0] rx_byte;
  logic       rx_valid, rx_err;
  // data link -> transaction (receiver)
  logic [8*TLP_BYTES-1:0] rx_tlp;
  logic                   rx_tlp_valid;

  tl_tx u_tl_tx (
    .clk, .rst_n, .data_in, .data_valid, .is_cpl, .corrupt(tl_corrupt), .tx_ready,
    .tlp_byte, .tlp_valid, .tlp_ready, .pkt_ack(ack_tl), .pkt_nack(nack_dl || nack_tl)
  );

  dl_tx #(.TLP_LEN(TLP_BYTES)) u_dl_tx (
    .clk, .rst_n, .in_byte(tlp_byte), .in_valid(tlp_valid), .in_ready(tlp_ready),
    .out_byte(frm_byte), .out_valid(frm_valid), .out_ready(frm_ready)
  );

  phy_tx #(.SER_W(SER_W)) u_phy_tx (
    .clk, .rst_n, .in_byte(frm_byte), .in_valid(frm_valid), .in_ready(frm_ready),
    .ser_data(tx_ser), .ser_valid(tx_ser_valid)
  );

  assign rx_ser = tx_ser ^ link_flip;

  phy_rx #(.SER_W(SER_W)) u_phy_rx (
    .clk, .rst_n, .ser_data(rx_ser), .ser_valid(tx_ser_valid),
    .out_byte(rx_byte), .out_valid(rx_valid), .out_err(rx_err), .phy_err
  );

  dl_rx #(.TLP_LEN(TLP_BYTES)) u_dl_rx (
    .clk, .rst_n, .in_byte(rx_byte), .in_valid(rx_valid), .in_err(rx_err),
    .tlp(rx_tlp), .tlp_valid(rx_tlp_valid), .ack_dl, .nack_dl
  );

  tl_rx u_tl_rx (
    .clk, .rst_n, .tlp(rx_tlp), .tlp_valid(rx_tlp_valid), .data_out, .data_out_valid,
    .rx_is_cpl, .ack_tl, .nack_tl
  );

endmodule
