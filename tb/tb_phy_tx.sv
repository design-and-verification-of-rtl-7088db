// tb_phy_tx - self-checking test of the physical layer transmitter: random
// bytes, offered with random gaps, are rebuilt from the serial line into
// 16-bit words and compared with a model of scrambler, 8b/10b encoder and
// even-parity generator; every word has even parity and zero upper bits;
// back-to-back bytes occupy 19 clocks each (16 link bits + 3).
module tb_phy_tx;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_byte = '0;
  logic in_ready, ser_data, ser_valid;
  logic [15:0] s = 16'hFFFF, w, got, q [$];
  logic rd = 0;
  int checks = 0, failures = 0, nbits = 0, nwords = 0, cyc = 0, t_first = 0, t_last = 0;
  `include "tb_phy_model.svh"
  always #5 clk = ~clk;
  phy_tx dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(negedge clk) begin
    cyc++;
    if (rst_n && ser_valid) begin
      got = {got[14:0], ser_data}; nbits++;
      if (nbits == 16) begin
        nbits = 0; nwords++;
        if (nwords == 1) t_first = cyc;
        if (nwords == 21) t_last = cyc;
        w = q.pop_front();
        check(got == w, $sformatf("word %0d got %h exp %h", nwords, got, w));
        check(got[15:11] == 0 && ($countones(got) % 2) == 0, "even parity, upper bits zero");
      end
    end
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    s = 16'hFFFF; rd = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      in_byte = (n < 6) ? 8'h55 : 8'($urandom);
      w = model_word(s, rd, in_byte);
      q.push_back(w);
      in_valid = 1;
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 0;
      if (n > 40) repeat ($urandom_range(0, 25)) @(posedge clk);
      #1;
    end
    while (nwords < 300) @(posedge clk);
    check(t_last - t_first == 20 * 19, $sformatf("19 clocks per byte (%0d for 20)", t_last - t_first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
