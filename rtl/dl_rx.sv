// dl_rx - data link layer receiver: checks the LCRC of each frame.
//
// Bytes from the physical layer are counted into frames of TLP_LEN + 4.
// The first TLP_LEN are stored and fed, bit-serially and most significant
// bit first, into its own lcrc32; the last four are the LCRC sent by the
// transmitter. When a frame is complete the computed and received LCRC are
// compared: if they are equal and no byte of the frame was flagged by the
// physical layer, ack_dl pulses and the TLP is handed to the transaction
// layer (tlp, tlp_valid); otherwise nack_dl pulses and the TLP is dropped,
// asking the transmitter to send the frame again. The LCRC comparison and
// ACK/NACK follow the original design; the frame length, the byte order and
// folding physical-layer errors into NACK are this design's choices.
//
// Interface: rst_n active low; in_byte/in_valid/in_err from phy_rx. tlp
// holds byte i in bits [8i+7:8i]. Timing: ack_dl/nack_dl/tlp_valid pulse for
// one clock, one clock after the last byte of the frame. Bytes must be at
// least nine clocks apart (the physical layer delivers one every 19).
module dl_rx
  import pcie_pkg::*;
#(
  parameter int unsigned TLP_LEN = pcie_pkg::TLP_BYTES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [7:0]             in_byte,
  input  logic                   in_valid,
  input  logic                   in_err,
  output logic [8*TLP_LEN-1:0] tlp,
  output logic                   tlp_valid,
  output logic                   ack_dl,
  output logic                   nack_dl
);

  localparam int unsigned FRAME = TLP_LEN + 4;
  localparam int unsigned CW    = $clog2(FRAME + 1);

  logic [CW-1:0] nbytes;
  logic [7:0]    sh;
  logic [3:0]    bits_left;
  logic [31:0]   rx_lcrc;
  logic          bad;
  logic          check;
  logic          crc_init;
  logic [31:0]   c_unused, lcrc;

  assign crc_init = check;

  lcrc32 u_lcrc (
    .clk, .rst_n, .enable(bits_left != '0), .init(crc_init), .data_in(sh[7]),
    .c(c_unused), .lcrc_out(lcrc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nbytes    <= '0;
      sh        <= '0;
      bits_left <= '0;
      rx_lcrc   <= '0;
      bad       <= 1'b0;
      check     <= 1'b0;
      tlp       <= '0;
      tlp_valid <= 1'b0;
      ack_dl    <= 1'b0;
      nack_dl   <= 1'b0;
    end else begin
      tlp_valid <= 1'b0;
      ack_dl    <= 1'b0;
      nack_dl   <= 1'b0;
      check     <= 1'b0;
      if (bits_left != '0) begin
        sh        <= {sh[6:0], 1'b0};
        bits_left <= bits_left - 1'b1;
      end
      if (in_valid) begin
        if (in_err) bad <= 1'b1;
        if (nbytes < CW'(TLP_LEN)) begin
          tlp[8*nbytes +: 8] <= in_byte;
          sh        <= in_byte;
          bits_left <= 4'd8;
        end else begin
          rx_lcrc <= {rx_lcrc[23:0], in_byte};
        end
        if (nbytes == CW'(FRAME - 1)) begin
          nbytes <= '0;
          check  <= 1'b1;
        end else begin
          nbytes <= nbytes + 1'b1;
        end
      end
      if (check) begin
        bad <= 1'b0;
        if (!bad && rx_lcrc == lcrc) begin
          ack_dl    <= 1'b1;
          tlp_valid <= 1'b1;
        end else begin
          nack_dl <= 1'b1;
        end
      end
    end
  end

  // the serial CRC must have finished a byte before the next one arrives
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && nbytes < CW'(TLP_LEN) |-> bits_left == '0);

endmodule
