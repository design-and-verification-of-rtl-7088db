// tb_hdr_trl_fifo - self-checking test of the 6 x 8 header/trailer FIFO: a
// loaded word comes out as header, data[7:0] .. data[31:24], trailer 77;
// empty rises after six pops and extra pops are ignored; rewind replays the
// same six bytes; a new load replaces the packet.
module tb_hdr_trl_fifo;
  logic clk = 0, rst_n = 0, load = 0, pop = 0, rewind = 0;
  logic [7:0] hdr = '0, dout;
  logic [31:0] data = '0;
  logic empty;
  logic [7:0] exp [6];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  hdr_trl_fifo dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (dout %h)", what, dout); end
  endtask
  task automatic drain(input string what);
    for (int i = 0; i < 6; i++) begin
      check(!empty && dout == exp[i], $sformatf("%s byte %0d exp %h", what, i, exp[i]));
      pop = 1; @(posedge clk); #1; pop = 0;
    end
    check(empty, {what, ": empty after six"});
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(empty, "empty after reset");
    for (int n = 0; n < 50; n++) begin
      hdr = (n % 2 != 0) ? 8'hAF : 8'hFA; data = (n == 0) ? 32'h3333_3333 : $urandom;
      exp = '{hdr, data[7:0], data[15:8], data[23:16], data[31:24], 8'h77};
      load = 1; @(posedge clk); #1; load = 0;
      drain("first pass");
      pop = 1; @(posedge clk); #1; pop = 0;
      check(empty, "pop on empty ignored");
      if (n % 3 == 0) begin
        rewind = 1; @(posedge clk); #1; rewind = 0;
        drain("replay");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
