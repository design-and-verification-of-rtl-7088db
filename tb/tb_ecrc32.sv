// tb_ecrc32 - self-checking test of the 32-bit ECRC generator.
// Checks the reference values f0f0f0f0 -> 6b6ec559 -> (0f0f0f0f) 8088083a
// from the seed, then random words against a long-division CRC model, the
// hold behaviour with ecrc_en low and the reload by ecrc_init.
module tb_ecrc32;
  logic clk = 0, rst_n = 0, ecrc_init = 0, ecrc_en = 0;
  logic [31:0] data_in = '0, ecrc_out, model;
  int checks = 0, failures = 0;
  `include "tb_crc_ref.svh"
  always #5 clk = ~clk;
  ecrc32 dut (.*);
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
    #1 rst_n = 1; check(ecrc_out, 32'hFFFF_FFFF, "seed after reset");
    ecrc_en = 1; data_in = 32'hf0f0_f0f0; @(posedge clk); #1;
    check(ecrc_out, 32'h6b6e_c559, "f0f0f0f0 (one clock)");
    data_in = 32'h0f0f_0f0f; @(posedge clk); #1;
    check(ecrc_out, 32'h8088_083a, "then 0f0f0f0f");
    ecrc_en = 0; data_in = 32'h1234_5678; @(posedge clk); #1;
    check(ecrc_out, 32'h8088_083a, "hold");
    ecrc_init = 1; @(posedge clk); #1; ecrc_init = 0;
    check(ecrc_out, 32'hFFFF_FFFF, "init");
    model = 32'hFFFF_FFFF;
    for (int n = 0; n < 200; n++) begin
      data_in = $urandom; ecrc_en = ($urandom_range(0, 3) != 0);
      if (ecrc_en) model = ref_crc_bits(model, {192'b0, data_in}, 32);
      @(posedge clk); #1;
      check(ecrc_out, model, "random stream");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
