// dl_tx - data link layer transmitter: appends the 32-bit LCRC to each TLP.
//
// Bytes from the transaction layer are taken one at a time. Each byte is
// first fed into the bit-serial LCRC generator (lcrc32), most significant
// bit first, one bit per clock, and then offered to the physical layer.
// After TLP_LEN bytes the four bytes of lcrc_out follow, most significant
// byte first, and the generator is re-seeded for the next frame. A frame is
// therefore TLP_LEN + 4 bytes. The LCRC itself follows the original
// design; the byte and bit order, the framing by byte count and the
// valid/ready handshakes on both sides are this design's choices.
//
// Interface: rst_n active low; in_* from the transaction layer, out_* to
// the physical layer, both valid/ready. Timing: a byte spends eight clocks
// in the LCRC generator before it is offered downstream.
module dl_tx
  import pcie_pkg::*;
#(
  parameter int unsigned TLP_LEN = pcie_pkg::TLP_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_byte,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [7:0] out_byte,
  output logic       out_valid,
  input  logic       out_ready
);

  typedef enum logic [1:0] {S_TAKE, S_CRC, S_SEND, S_TAIL} state_t;

  localparam int unsigned CW = $clog2(TLP_LEN + 1);

  state_t      state;
  logic [7:0]  cur;
  logic [2:0]  bitn;
  logic [CW-1:0] nbytes;
  logic [1:0]  tail;
  logic        crc_en, crc_init;
  logic [31:0] c_unused, lcrc;

  assign in_ready  = (state == S_TAKE);
  assign crc_en    = (state == S_CRC);
  assign crc_init  = (state == S_TAIL) && out_ready && (tail == 2'd3);
  assign out_valid = (state == S_SEND) || (state == S_TAIL);
  assign out_byte  = (state == S_TAIL) ? lcrc[{~tail, 3'b000} +: 8] : cur;

  lcrc32 u_lcrc (
    .clk, .rst_n, .enable(crc_en), .init(crc_init), .data_in(cur[7 - bitn]),
    .c(c_unused), .lcrc_out(lcrc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_TAKE;
      cur    <= '0;
      bitn   <= '0;
      nbytes <= '0;
      tail   <= '0;
    end else begin
      unique case (state)
        S_TAKE: if (in_valid) begin
          cur   <= in_byte;
          bitn  <= '0;
          state <= S_CRC;
        end
        S_CRC: begin
          bitn <= bitn + 1'b1;
          if (bitn == 3'd7) state <= S_SEND;
        end
        S_SEND: if (out_ready) begin
          if (nbytes == CW'(TLP_LEN - 1)) begin
            nbytes <= '0;
            tail   <= '0;
            state  <= S_TAIL;
          end else begin
            nbytes <= nbytes + 1'b1;
            state  <= S_TAKE;
          end
        end
        S_TAIL: if (out_ready) begin
          tail <= tail + 1'b1;
          if (tail == 2'd3) state <= S_TAKE;
        end
        default: state <= S_TAKE;
      endcase
    end
  end

endmodule
