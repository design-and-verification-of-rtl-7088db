// deserializer - serial-in parallel-out (SIPO) converter of the receiver.
//
// Every bit marked by ser_valid is shifted in at the bottom of a WIDTH-bit
// register; after WIDTH bits the word appears on par_data, the first bit
// received in the most significant position, and par_ready pulses for one
// clock. Word alignment comes from reset: the bit counter starts at zero,
// so both ends of the link must leave reset together. The 16-bit width and
// the names par_data and par_ready follow the original design.
//
// Interface: rst_n active low. Timing: par_data and par_ready are
// registered, one clock after the last bit of a word.
module deserializer #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ser_data,
  input  logic             ser_valid,
  output logic [WIDTH-1:0] par_data,
  output logic             par_ready
);

  localparam int unsigned CW = $clog2(WIDTH);

  logic [WIDTH-1:0] shreg;
  logic [CW-1:0]    cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg     <= '0;
      cnt       <= '0;
      par_data  <= '0;
      par_ready <= 1'b0;
    end else begin
      par_ready <= 1'b0;
      if (ser_valid) begin
        shreg <= {shreg[WIDTH-2:0], ser_data};
        if (cnt == CW'(WIDTH - 1)) begin
          cnt       <= '0;
          par_data  <= {shreg[WIDTH-2:0], ser_data};
          par_ready <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
