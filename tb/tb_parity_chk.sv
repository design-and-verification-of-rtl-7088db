// tb_parity_chk - self-checking test of the parity checker (8-bit default):
// the reference case 11100101 (odd) gives parity_bit = 1 and reject_data;
// 11100100 (even) gives accept_data; then random bytes against a counted
// number of ones.
module tb_parity_chk;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] datai = '0;
  logic parity_bit, accept_data, reject_data, out_valid;
  bit odd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  parity_chk dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (in %b)", what, datai); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    en = 1; datai = 8'b1110_0101; @(posedge clk); #1;
    check(out_valid && parity_bit && reject_data && !accept_data, "11100101 rejected");
    datai = 8'b1110_0100; @(posedge clk); #1;
    check(!parity_bit && accept_data && !reject_data, "11100100 accepted");
    for (int n = 0; n < 500; n++) begin
      en = ($urandom_range(0, 1) != 0); datai = 8'($urandom);
      odd = 0; for (int b = 0; b < 8; b++) if (datai[b]) odd = !odd;
      @(posedge clk); #1;
      check(out_valid == en, "valid follows en");
      check(accept_data == (en && !odd) && reject_data == (en && odd), "accept/reject");
      if (en) check(parity_bit == odd, "parity_bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
