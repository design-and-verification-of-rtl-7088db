// tb_tl_tx - self-checking test of the transaction layer transmitter.
// For random words it collects the 10 TLP bytes (random back-pressure) and
// checks header FA/AF, data bytes, ECRC (long-division model) and trailer
// 77; answers some packets with pkt_nack and checks the identical replay;
// checks that tx_ready returns only after pkt_ack; and checks that the
// corrupt hook damages the first data byte of the first copy only.
module tb_tl_tx;
  logic clk = 0, rst_n = 0, data_valid = 0, is_cpl = 0, corrupt = 0;
  logic [31:0] data_in = '0, crc;
  logic tx_ready, tlp_valid, tlp_ready = 0, pkt_ack = 0, pkt_nack = 0;
  logic [7:0] tlp_byte;
  logic [7:0] exp [10], got [10];
  int checks = 0, failures = 0, replays = 0;
  `include "tb_crc_ref.svh"
  always #5 clk = ~clk;
  tl_tx dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic collect();
    for (int i = 0; i < 10; i++) begin
      tlp_ready = ($urandom_range(0, 2) != 0);
      while (!(tlp_valid && tlp_ready)) begin
        @(posedge clk); #1; tlp_ready = ($urandom_range(0, 2) != 0);
      end
      got[i] = tlp_byte; @(posedge clk); #1;
    end
    tlp_ready = 0;
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      bit bad;
      check(tx_ready, "ready when idle");
      data_in = (n == 0) ? 32'hf0f0_f0f0 : $urandom; is_cpl = n[0]; bad = (n % 5 == 2);
      corrupt = bad;
      crc = ref_crc_bits(32'hFFFF_FFFF, {192'b0, data_in}, 32);
      exp = '{is_cpl ? 8'hAF : 8'hFA, data_in[7:0], data_in[15:8], data_in[23:16], data_in[31:24],
              crc[31:24], crc[23:16], crc[15:8], crc[7:0], 8'h77};
      if (n == 0) check(crc == 32'h6b6e_c559, "reference ECRC");
      data_valid = 1; @(posedge clk); #1; data_valid = 0; corrupt = 0;
      check(!tx_ready, "busy after accept");
      collect();
      for (int i = 0; i < 10; i++)
        check(got[i] == (exp[i] ^ ((bad && i == 1) ? 8'h01 : 8'h00)), $sformatf("pkt %0d byte %0d got %h", n, i, got[i]));
      repeat (3) @(posedge clk); #1;
      check(!tx_ready && !tlp_valid, "waits for verdict");
      if (bad || n % 4 == 1) begin
        pkt_nack = 1; @(posedge clk); #1; pkt_nack = 0; replays++;
        collect();
        for (int i = 0; i < 10; i++) check(got[i] == exp[i], $sformatf("replay %0d byte %0d", n, i));
      end
      pkt_ack = 1; @(posedge clk); #1; pkt_ack = 0;
    end
    check(replays > 10, "replays exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
