// tb_lcrc32 - self-checking test of the bit-serial LCRC generator.
// Feeds random bit streams (with enable gaps) and compares c with a
// long-division CRC model, lcrc_out with c bit-reversed per byte, and
// checks init and the one-bit-per-clock rate. A second instance, with
// polynomial 00000001 and seed 80000000, must step through the reference
// sequence c = 80000000, 00000001, 00000003 (lcrc_out = 01000000, 00000080,
// 000000c0) for input bits 0 then 1.
module tb_lcrc32;
  logic clk = 0, rst_n = 0, enable = 0, init = 0, data_in = 0;
  logic [31:0] c, lcrc_out;
  logic [223:0] msg;
  int nb;
  int checks = 0, failures = 0;
  `include "tb_crc_ref.svh"
  always #5 clk = ~clk;
  lcrc32 dut (.*);
  logic init2 = 0, en2 = 0, d2 = 0;
  logic [31:0] c2, lcrc2;
  lcrc32 #(.POLY(32'h0000_0001), .SEED(32'h8000_0000)) dut2 (
    .clk, .rst_n, .enable(en2), .init(init2), .data_in(d2), .c(c2), .lcrc_out(lcrc2));
  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1; check(c, 32'hFFFF_FFFF, "seed after reset");
    for (int frame = 0; frame < 10; frame++) begin
      init = 1; @(posedge clk); #1; init = 0;
      check(c, 32'hFFFF_FFFF, "seed after init");
      msg = '0; nb = 0;
      while (nb < 64 + frame * 8) begin
        enable = ($urandom_range(0, 4) != 0); data_in = ($urandom_range(0, 1) != 0);
        if (enable) begin msg = {msg[222:0], data_in}; nb++; end
        @(posedge clk); #1;
        check(c, ref_crc_bits(32'hFFFF_FFFF, msg, nb), "serial CRC");
        check(lcrc_out, byte_rev(c), "lcrc_out mapping");
      end
      enable = 0;
    end
    init2 = 1; @(posedge clk); #1; init2 = 0;
    check(c2, 32'h8000_0000, "ref seq c0"); check(lcrc2, 32'h0100_0000, "ref seq out0");
    en2 = 1; d2 = 0; @(posedge clk); #1;
    check(c2, 32'h0000_0001, "ref seq c1"); check(lcrc2, 32'h0000_0080, "ref seq out1");
    d2 = 1; @(posedge clk); #1;
    check(c2, 32'h0000_0003, "ref seq c2"); check(lcrc2, 32'h0000_00C0, "ref seq out2");
    en2 = 0; @(posedge clk); #1;
    check(c2, 32'h0000_0003, "ref seq hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
