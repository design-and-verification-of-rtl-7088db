// tb_parity_gen - self-checking test of the even-parity generator: for
// random 10-bit symbols the 11-bit output keeps the symbol in its upper bits
// and has an even number of ones; output valid one clock after en.
module tb_parity_gen;
  logic clk = 0, rst_n = 0, en = 0;
  logic [9:0] datai = '0;
  logic [10:0] datao;
  logic out_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  parity_gen dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (in %h out %h)", what, datai, datao); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    en = 1; datai = 10'b00_0000_0111; @(posedge clk); #1;
    check(out_valid && datao == 11'b000_0000_1111, "three ones -> parity 1");
    datai = 10'b00_0000_0011; @(posedge clk); #1;
    check(datao == 11'b000_0000_0110, "two ones -> parity 0");
    for (int n = 0; n < 500; n++) begin
      en = ($urandom_range(0, 1) != 0); datai = 10'($urandom);
      @(posedge clk); #1;
      check(out_valid == en, "valid follows en");
      if (en) begin
        check(datao[10:1] == datai, "data kept");
        check(($countones(datao) % 2) == 0, "even parity");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
