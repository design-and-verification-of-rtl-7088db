// serializer - parallel-in serial-out (PISO) converter of the transmitter.
//
// When ready and load are both high, the WIDTH-bit word par_data is taken
// into a shift register; during the next WIDTH clocks its bits leave on
// ser_data, most significant bit first, each one marked by ser_valid. ready
// is high when the register is empty. A new word may be loaded in the clock
// in which the last bit leaves, so back-to-back words follow one another
// without a gap. The 16-bit width follows the original design; the MSB-first
// order and the valid strobe are this design's choices.
//
// Interface: rst_n active low. Timing: ser_data and ser_valid come from
// registers; the first bit appears one clock after load.
module serializer #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] par_data,
  input  logic             load,
  output logic             ready,
  output logic             ser_data,
  output logic             ser_valid
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] shreg;
  logic [CW-1:0]    cnt;

  assign ready     = (cnt == '0) || (cnt == CW'(1));
  assign ser_valid = (cnt != '0);
  assign ser_data  = shreg[WIDTH-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg <= '0;
      cnt   <= '0;
    end else if (load && ready) begin
      shreg <= par_data;
      cnt   <= CW'(WIDTH);
    end else if (cnt != '0) begin
      shreg <= {shreg[WIDTH-2:0], 1'b0};
      cnt   <= cnt - 1'b1;
    end
  end

endmodule
