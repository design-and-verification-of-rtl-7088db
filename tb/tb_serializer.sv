// tb_serializer - self-checking test of the 16-bit PISO serializer: the
// reference words F0F0 and AFAF and random words come out MSB first, one bit
// per clock for exactly 16 clocks per word; back-to-back loads leave no gap
// and a load while busy is ignored.
module tb_serializer;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] par_data = '0, q [$], w, got;
  logic ready, ser_data, ser_valid;
  int nbits = 0, nwords = 0, first_bit_cycle = -1, last_bit_cycle = 0, cycle = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  serializer dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // collector: rebuild words from the serial stream
  always @(negedge clk) begin
    cycle++;
    if (rst_n && ser_valid) begin
      if (first_bit_cycle < 0) first_bit_cycle = cycle;
      last_bit_cycle = cycle;
      got = {got[14:0], ser_data}; nbits++;
      if (nbits == 16) begin
        nbits = 0; nwords++;
        w = q.pop_front();
        check(got == w, $sformatf("word %0d: got %h exp %h", nwords, got, w));
      end
    end
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(ready && !ser_valid, "idle after reset");
    // two words back to back: 32 bits in 32 consecutive clocks
    for (int i = 0; i < 2; i++) begin
      par_data = (i == 0) ? 16'hF0F0 : 16'hAFAF;
      while (!ready) begin load = 0; @(posedge clk); #1; end
      load = 1; q.push_back(par_data); @(posedge clk); #1; load = 0;
      if (i == 0) begin
        par_data = 16'hDEAD; load = 1; @(posedge clk); #1; load = 0;  // busy: ignored
      end
    end
    while (nwords < 2) begin @(posedge clk); #1; end
    check(last_bit_cycle - first_bit_cycle == 31, $sformatf("32 bits in %0d clocks", last_bit_cycle - first_bit_cycle + 1));
    for (int n = 0; n < 100; n++) begin
      repeat ($urandom_range(0, 20)) @(posedge clk);
      #1; while (!ready) begin @(posedge clk); #1; end
      par_data = 16'($urandom); q.push_back(par_data);
      load = 1; @(posedge clk); #1; load = 0;
    end
    while (nwords < 102) begin @(posedge clk); #1; end
    check(q.size() == 0, "all words sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
