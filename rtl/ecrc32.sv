// ecrc32 - 32-bit End-to-End CRC generator of the transaction layer.
//
// One 32-bit word is absorbed per clock while ecrc_en is high; the CRC
// register (ecrc_out) accumulates over successive words. The CRC is the
// PCIe CRC-32 polynomial 04C11DB7, MSB first, seeded with all ones and with
// no output inversion: from the seed, word f0f0f0f0 gives 6b6ec559 and a
// following 0f0f0f0f gives 8088083a, the reference values of the original
// design. The same block computes ECRC_TX at the transmitter and ECRC_RX at
// the receiver.
//
// Interface: rst_n (active low) and ecrc_init both reload the seed;
// ecrc_init has priority over ecrc_en. Timing: ecrc_out holds the CRC of
// every word absorbed up to the previous clock edge (one clock latency).
// The ecrc_init input is this design's addition for per-packet operation.
module ecrc32
  import pcie_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ecrc_init,
  input  logic              ecrc_en,
  input  logic [DATA_W-1:0] data_in,
  output logic [31:0]       ecrc_out
);

  logic [31:0] next_crc;

  always_comb begin
    next_crc = ecrc_out;
    for (int i = DATA_W - 1; i >= 0; i--) next_crc = crc32_bit(next_crc, data_in[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || ecrc_init) ecrc_out <= CRC_SEED;
    else if (ecrc_en)        ecrc_out <= next_crc;
  end

endmodule
