// tb_tl_rx - self-checking test of the transaction layer receiver: TLPs with
// a correct ECRC give ack_tl and the word on data_out two clocks after
// tlp_valid; a wrong ECRC or a damaged data byte gives nack_tl and no
// data_out_valid; rx_is_cpl follows the header.
module tb_tl_rx;
  logic clk = 0, rst_n = 0, tlp_valid = 0;
  logic [79:0] tlp = '0;
  logic [31:0] data_out, d, crc;
  logic data_out_valid, rx_is_cpl, ack_tl, nack_tl;
  int checks = 0, failures = 0, acks = 0, nacks = 0;
  `include "tb_crc_ref.svh"
  always #5 clk = ~clk;
  tl_rx dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      bit cpl; int fault;
      d = $urandom; cpl = $urandom_range(0, 1) != 0; fault = $urandom_range(0, 3);
      crc = ref_crc_bits(32'hFFFF_FFFF, {192'b0, d}, 32);
      tlp = {8'h77, crc[7:0], crc[15:8], crc[23:16], crc[31:24], d, cpl ? 8'hAF : 8'hFA};
      if (fault == 1) tlp[40 + $urandom_range(0, 31)] ^= 1'b1;  // ECRC bit
      if (fault == 2) tlp[8 + $urandom_range(0, 31)] ^= 1'b1;   // data bit
      tlp_valid = 1; @(posedge clk); #1; tlp_valid = 0;
      check(!ack_tl && !nack_tl, "no early verdict");
      @(posedge clk); #1;
      if (fault == 1 || fault == 2) begin
        check(nack_tl && !ack_tl && !data_out_valid, "nack on ECRC mismatch"); nacks++;
      end else begin
        check(ack_tl && !nack_tl && data_out_valid && data_out == d && rx_is_cpl == cpl, "ack and data");
        acks++;
      end
      @(posedge clk); #1;
      check(!ack_tl && !nack_tl, "one-clock pulse");
    end
    check(acks > 50 && nacks > 50, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
