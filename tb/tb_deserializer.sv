// tb_deserializer - self-checking test of the 16-bit SIPO deserializer:
// random words sent MSB first with random gaps in ser_valid come back
// whole; par_ready pulses once per word, in the clock after the one that
// carried its last bit.
module tb_deserializer;
  logic clk = 0, rst_n = 0, ser_data = 0, ser_valid = 0;
  logic [15:0] par_data, w;
  logic par_ready;
  int checks = 0, failures = 0, pulses = 0;
  always #5 clk = ~clk;
  deserializer dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(negedge clk) if (par_ready) pulses++;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      w = (n == 0) ? 16'hF0F0 : (n == 1) ? 16'hAFAF : 16'($urandom);
      for (int b = 15; b >= 0; b--) begin
        ser_valid = 1; ser_data = w[b];
        @(posedge clk); #1;
        if (b == 0) check(par_ready && par_data == w, $sformatf("word %0d: got %h exp %h", n, par_data, w));
        else        check(!par_ready, "no early par_ready");
        if (n > 2 && $urandom_range(0, 3) == 0) begin ser_valid = 0; ser_data = $urandom_range(0, 1) != 0; @(posedge clk); #1; end
      end
      ser_valid = 0;
      @(posedge clk); #1;
      check(!par_ready, "par_ready lasts one clock");
    end
    check(pulses == 200, "one par_ready per word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
