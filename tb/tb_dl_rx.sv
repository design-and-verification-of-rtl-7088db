// tb_dl_rx - self-checking test of the data link receiver: frames of 10 TLP
// bytes plus their LCRC (long-division model, bytes bit-reversed) are
// delivered one byte every 19 clocks. A good frame gives ack_dl and
// tlp_valid with the 10 bytes, one clock after its last byte; a frame with
// a damaged byte or LCRC, or with a byte flagged in_err, gives nack_dl.
module tb_dl_rx;
  logic clk = 0, rst_n = 0, in_valid = 0, in_err = 0;
  logic [7:0] in_byte = '0;
  logic [79:0] tlp;
  logic tlp_valid, ack_dl, nack_dl;
  logic [7:0] f [], fr [14];
  logic [31:0] lc;
  int checks = 0, failures = 0, acks = 0, nacks = 0;
  `include "tb_crc_ref.svh"
  always #5 clk = ~clk;
  dl_rx dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    f = new[10];
    for (int n = 0; n < 120; n++) begin
      int fault, pos;
      for (int i = 0; i < 10; i++) f[i] = 8'($urandom);
      lc = byte_rev(ref_crc_bytes(32'hFFFF_FFFF, f, 10));
      for (int i = 0; i < 10; i++) fr[i] = f[i];
      {fr[10], fr[11], fr[12], fr[13]} = lc;
      fault = (n < 3) ? 0 : $urandom_range(0, 3);
      pos = $urandom_range(0, 13);
      if (fault == 1) fr[pos] ^= 8'(1 << $urandom_range(0, 7));
      for (int i = 0; i < 14; i++) begin
        in_valid = 1; in_byte = fr[i]; in_err = (fault == 2 && i == pos);
        @(posedge clk); #1; in_valid = 0; in_err = 0;
        if (i < 13) begin
          check(!ack_dl && !nack_dl && !tlp_valid, "no verdict inside a frame");
          repeat (18) @(posedge clk);
          #1;
        end
      end
      @(posedge clk); #1;
      if (fault == 1 || fault == 2) begin
        check(nack_dl && !ack_dl && !tlp_valid, $sformatf("frame %0d nack", n)); nacks++;
      end else begin
        check(ack_dl && !nack_dl && tlp_valid, $sformatf("frame %0d ack", n)); acks++;
        for (int i = 0; i < 10; i++) check(tlp[8*i +: 8] == f[i], "TLP byte");
      end
      repeat (18) @(posedge clk);
      #1;
    end
    check(acks > 20 && nacks > 20, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
