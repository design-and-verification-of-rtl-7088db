// tb_enc8b10b - self-checking test of the 8b/10b encoder.
// Part 1: a fixed sequence with hand-worked symbols, held as
// {j,h,g,f,i,e,d,c,b,a}: D0.0 (RD-) = 0B9, K28.5 (RD-) = 17C, K28.5 (RD+) =
// 283, D21.5 = 155, D17.7 (RD-, alternate) = 3B1, D11.7 (RD+, alternate) =
// 04B. Part 2: a random data stream, checked for the line-code rules: every
// symbol has 4, 5 or 6 ones, the running digital sum at symbol ends stays
// at -1/+1 and agrees with dispout, no run of equal bits is longer than 5,
// and no two different bytes share a symbol at the same disparity.
module tb_enc8b10b;
  logic clk = 0, rst_n = 0, en = 0, k = 0;
  logic [7:0] data_in = '0;
  logic [9:0] dataout;
  logic out_valid, dispout;
  int checks = 0, failures = 0;
  int rds, run, last_bit, ones;
  logic [7:0] seen [2][1024];
  logic       used [2][1024];
  always #5 clk = ~clk;
  enc8b10b dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (dataout %h)", what, dataout); end
  endtask
  task automatic send(input logic kk, input logic [7:0] d);
    en = 1; k = kk; data_in = d; @(posedge clk); #1; en = 0; k = 0;
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send(0, 8'h00); check(out_valid && dataout == 10'h0B9, "D0.0 -> 0B9");
    check(dispout == 1'b0, "RD after D0.0");
    send(1, 8'hBC); check(dataout == 10'h17C && dispout, "K28.5 RD-");
    send(1, 8'hBC); check(dataout == 10'h283 && !dispout, "K28.5 RD+");
    send(0, 8'hB5); check(dataout == 10'h155 && !dispout, "D21.5");
    send(0, 8'hF1); check(dataout == 10'h3B1 && dispout, "D17.7 alternate");
    send(0, 8'hEB); check(dataout == 10'h04B && !dispout, "D11.7 alternate");
    // random stream
    rds = -1; run = 0; last_bit = 2;
    for (int i = 0; i < 1024; i++) begin used[0][i] = 0; used[1][i] = 0; end
    for (int n = 0; n < 3000; n++) begin
      logic rd_before;
      rd_before = dispout;
      send(0, 8'($urandom));
      ones = $countones(dataout);
      check(ones >= 4 && ones <= 6, "symbol weight");
      rds += 2 * ones - 10;
      check(rds == -1 || rds == 1, "running digital sum bounded");
      check(dispout == (rds == 1), "dispout matches running sum");
      for (int b = 0; b < 10; b++) begin   // bit a (bit 0) is sent first
        if (dataout[b] == last_bit[0] && last_bit != 2) run++; else run = 1;
        last_bit = int'(dataout[b]);
        if (run > 5) begin check(0, "run length"); run = 0; end
      end
      if (used[rd_before][dataout] && seen[rd_before][dataout] != data_in)
        check(0, "two bytes share a symbol");
      used[rd_before][dataout] = 1; seen[rd_before][dataout] = data_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
