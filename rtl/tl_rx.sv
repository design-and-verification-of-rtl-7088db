// tl_rx - transaction layer receiver: end-to-end check of each TLP.
//
// A TLP that passed the link check arrives as TLP_BYTES bytes in parallel
// with tlp_valid. The receiver recomputes the ECRC of its four data bytes
// with its own ecrc32 (ECRC_RX) and compares it with the ECRC carried in
// the packet (ECRC_TX). If they are equal, ack_tl pulses and the 32-bit word
// appears on data_out with data_out_valid; rx_is_cpl tells whether the
// header was the completion header AF. If they differ, nack_tl pulses and
// the word is dropped. The ECRC comparison and ACK/NACK follow the original
// design; the byte layout matches tl_tx.
//
// Interface: rst_n active low; tlp holds byte i in bits [8i+7:8i]. Timing:
// ack_tl/nack_tl and data_out_valid pulse two clocks after tlp_valid.
module tl_rx
  import pcie_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [8*TLP_BYTES-1:0] tlp,
  input  logic                   tlp_valid,
  output logic [31:0]            data_out,
  output logic                   data_out_valid,
  output logic                   rx_is_cpl,
  output logic                   ack_tl,
  output logic                   nack_tl
);

  logic [31:0] data_q, ecrc_tx, ecrc_rx;
  logic        is_cpl_q;
  logic        cmp;

  // ECRC_RX is computed in the clock in which the TLP arrives
  ecrc32 #(.DATA_W(32)) u_ecrc (
    .clk, .rst_n, .ecrc_init(!tlp_valid), .ecrc_en(tlp_valid),
    .data_in(tlp[8*TLP_DATA +: 32]), .ecrc_out(ecrc_rx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_q         <= '0;
      ecrc_tx        <= '0;
      is_cpl_q       <= 1'b0;
      cmp            <= 1'b0;
      data_out       <= '0;
      data_out_valid <= 1'b0;
      rx_is_cpl      <= 1'b0;
      ack_tl         <= 1'b0;
      nack_tl        <= 1'b0;
    end else begin
      cmp            <= tlp_valid;
      ack_tl         <= 1'b0;
      nack_tl        <= 1'b0;
      data_out_valid <= 1'b0;
      if (tlp_valid) begin
        data_q   <= tlp[8*TLP_DATA +: 32];
        ecrc_tx  <= {tlp[8*TLP_ECRC +: 8], tlp[8*(TLP_ECRC+1) +: 8],
                     tlp[8*(TLP_ECRC+2) +: 8], tlp[8*(TLP_ECRC+3) +: 8]};
        is_cpl_q <= (tlp[8*TLP_HDR +: 8] == HDR_CPL);
      end
      if (cmp) begin
        if (ecrc_rx == ecrc_tx) begin
          ack_tl         <= 1'b1;
          data_out       <= data_q;
          data_out_valid <= 1'b1;
          rx_is_cpl      <= is_cpl_q;
        end else begin
          nack_tl <= 1'b1;
        end
      end
    end
  end

endmodule
