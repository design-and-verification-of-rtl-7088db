// tb_phy_rx - self-checking test of the physical layer receiver: 16-bit
// link words built by the transmit-side model are sent bit-serially (with
// idle gaps); the bytes must come back descrambled, without error, four
// clocks after each word's last bit. Words with one flipped bit must raise
// phy_err and out_err for that byte, and the following bytes must still
// decode (the descrambler stays in step); such a damaged symbol may also
// flag a disparity error on one of the next few symbols.
module tb_phy_rx;
  logic clk = 0, rst_n = 0, ser_data = 0, ser_valid = 0;
  logic [7:0] out_byte, exp_q [$], e;
  logic out_valid, out_err, phy_err;
  logic [15:0] s = 16'hFFFF, w;
  logic rd = 0;
  bit   bad_q [$], bad;
  int since_bad = 100;
  int checks = 0, failures = 0, nerr = 0, nphy = 0, nout = 0, t_last = 0, cyc = 0;
  `include "tb_phy_model.svh"
  always #5 clk = ~clk;
  phy_rx dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(negedge clk) begin
    cyc++;
    if (phy_err) nphy++;
    if (out_valid) begin
      e = exp_q.pop_front(); bad = bad_q.pop_front(); nout++;
      if (nout <= 3) check(cyc - t_last == 4, $sformatf("latency %0d", cyc - t_last));
      if (bad) begin check(out_err, "flagged byte"); nerr++; since_bad = 0; end
      else begin
        since_bad++;
        check(out_byte == e, $sformatf("byte %0d got %h exp %h", nout, out_byte, e));
        // a damaged symbol can leave the disparity wrong for a few symbols
        if (since_bad > 4) check(!out_err, $sformatf("byte %0d flagged", nout));
      end
    end
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    s = 16'hFFFF; rd = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [7:0] d; bit flip; int fb;
      d = 8'($urandom);
      w = model_word(s, rd, d);
      flip = (n > 10) && ($urandom_range(0, 9) == 0);
      fb = $urandom_range(0, 10);
      if (flip) w[fb] ^= 1'b1;
      exp_q.push_back(d); bad_q.push_back(flip);
      for (int b = 15; b >= 0; b--) begin
        ser_valid = 1; ser_data = w[b]; @(posedge clk); #1;
      end
      t_last = cyc;
      ser_valid = 0; ser_data = 0;
      repeat ($urandom_range(3, 10)) @(posedge clk);
      #1;
    end
    repeat (10) @(posedge clk);
    check(nout == 400, "all bytes out");
    check(nphy == nerr && nerr > 10, $sformatf("phy_err pulses %0d for %0d bad words", nphy, nerr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
