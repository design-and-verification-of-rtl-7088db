// tb_descrambler - self-checking test of the descrambler (same reference values: scrambling is its own inverse).
// Replays the reference sequence AA, FF, 55, 55, 55, 55 -> 55, E8, 95, 41,
// E7, B2 (one clock latency), then compares a random stream with a
// bit-by-bit shift-by-shift model of x^16+x^5+x^4+x^3+1.
module tb_descrambler;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] inbyte = '0, data_out, exp;
  logic out_valid;
  logic [15:0] m;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  descrambler dut (.*);
  task automatic check(input logic [7:0] got, input logic [7:0] e, input string what);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, got, e); end
  endtask
  // model: 16-bit register, output s[15] fed back into bits 0, 3, 4, 5
  function automatic logic [7:0] model_byte(inout logic [15:0] s, input logic [7:0] d);
    logic [7:0] r; logic o;
    for (int i = 0; i < 8; i++) begin
      o = s[15]; r[i] = d[i] ^ o;
      s = {s[14:5], s[4] ^ o, s[3] ^ o, s[2] ^ o, s[1:0], o};
    end
    return r;
  endfunction
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    static logic [7:0] ins [6] = '{8'hAA, 8'hFF, 8'h55, 8'h55, 8'h55, 8'h55};
    static logic [7:0] outs[6] = '{8'h55, 8'hE8, 8'h95, 8'h41, 8'hE7, 8'hB2};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      en = 1; inbyte = ins[i]; @(posedge clk); #1;
      checks++; if (!out_valid) begin failures++; $display("FAIL out_valid"); end
      check(data_out, outs[i], "reference sequence");
    end
    en = 0; @(posedge clk); #1;
    checks++; if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
    // restart and compare with the model
    rst_n = 0; @(posedge clk); #1 rst_n = 1; m = 16'hFFFF;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom_range(0, 2) != 0); inbyte = 8'($urandom);
      if (en) exp = model_byte(m, inbyte);
      @(posedge clk); #1;
      if (en) check(data_out, exp, "random stream");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
