// tb_dec10b8b - self-checking test of the 10b/8b decoder.
// Checks the reference symbols 0B9 -> 000, then 0EE -> 061 (D1.3) and
// 1AD -> 0C2 (D2.6); control symbols K28.5 in both polarities; every data
// byte and every control byte encoded by the package's encode function in a
// running-disparity stream decodes back without error; and a symbol that is
// in no table (3FF) and one with the wrong disparity raise code_err/disp_err.
module tb_dec10b8b;
  import code8b10b_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [9:0] datain = '0;
  logic [8:0] dataout;
  logic out_valid, code_err, disp_err, dispout;
  logic [10:0] e;
  logic rd;
  int checks = 0, failures = 0;
  logic [7:0] kcodes [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                              8'hF7, 8'hFB, 8'hFD, 8'hFE};
  always #5 clk = ~clk;
  dec10b8b dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (in %h out %h ce %b de %b)", what, datain, dataout, code_err, disp_err); end
  endtask
  task automatic put(input logic [9:0] s);
    en = 1; datain = s; @(posedge clk); #1; en = 0;
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    put(10'h0B9); check(out_valid && dataout == 9'h000 && !code_err && !disp_err, "0B9 -> 000");
    put(10'h0EE); check(dataout == 9'h061, "0EE -> 061");
    put(10'h1AD); check(dataout == 9'h0C2, "1AD -> 0C2");
    put(10'h3FF); check(code_err, "3FF is no symbol");
    // back to a known disparity
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    put(10'h17C); check(dataout == 9'h1BC && !code_err && !disp_err && dispout, "K28.5 RD-");
    put(10'h283); check(dataout == 9'h1BC && !code_err && !disp_err && !dispout, "K28.5 RD+");
    put(10'h283); check(disp_err, "K28.5 RD+ at negative disparity");
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    rd = 0;
    for (int r = 0; r < 2; r++)
      for (int d = 0; d < 256; d++) begin
        e = encode(rd, 1'b0, 8'(d)); rd = e[10];
        put(e[9:0]);
        check(dataout == {1'b0, 8'(d)} && !code_err && !disp_err && dispout == rd, "data round trip");
      end
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 12; i++) begin
        e = encode(rd, 1'b1, kcodes[i]); rd = e[10];
        put(e[9:0]);
        check(dataout == {1'b1, kcodes[i]} && !code_err && !disp_err, "control round trip");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
