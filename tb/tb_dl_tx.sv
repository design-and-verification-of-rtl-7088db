// tb_dl_tx - self-checking test of the data link transmitter: frames of 10
// random TLP bytes come out as the same 10 bytes followed by the 4 bytes of
// the LCRC (c of a long-division CRC model, bits of each byte reversed, most
// significant byte first), under random back-pressure on both sides; each
// byte spends at least 8 clocks in the serial LCRC.
module tb_dl_tx;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  logic [7:0] in_byte = '0, out_byte;
  logic in_ready, out_valid;
  logic [7:0] tlp [], got [14];
  logic [31:0] lc;
  int checks = 0, failures = 0, t_in, t_out;
  `include "tb_crc_ref.svh"
  always #5 clk = ~clk;
  dl_tx dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // sink
  int nout = 0;
  always @(negedge clk) begin
    out_ready <= ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      got[nout % 14] = out_byte; nout++;
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    tlp = new[10];
    for (int f = 0; f < 40; f++) begin
      for (int i = 0; i < 10; i++) tlp[i] = (f == 0) ? 8'(i) : 8'($urandom);
      lc = byte_rev(ref_crc_bytes(32'hFFFF_FFFF, tlp, 10));
      for (int i = 0; i < 10; i++) begin
        in_valid = 1; in_byte = tlp[i];
        do @(posedge clk); while (!in_ready);
        t_in = int'($time / 10);
        #1 in_valid = 0;
        while (nout % 14 != i + 1) @(posedge clk);
        t_out = int'($time / 10);
        check(t_out - t_in >= 8, "eight clocks of serial LCRC per byte");
        #1;
      end
      while (nout != 14 * (f + 1)) begin @(posedge clk); #1; end
      for (int i = 0; i < 10; i++) check(got[i] == tlp[i], $sformatf("frame %0d byte %0d", f, i));
      check({got[10], got[11], got[12], got[13]} == lc,
            $sformatf("frame %0d LCRC got %h exp %h", f, {got[10], got[11], got[12], got[13]}, lc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
