// tb_pcie_v3 - end-to-end test of the PCIe 3.0 soft IP at its default
// parameters: 32-bit words go in at data_in, travel through transaction,
// data link and physical layers and the serial link, and must come out at
// data_out exactly once each, in order, with the right header type.
// Some packets get a bit inverted on the link (link_flip), which must show
// up as phy_err and nack_dl and be repaired by retransmission; some are
// damaged after their ECRC was computed (tl_corrupt), which must show up as
// nack_tl and likewise be repaired. Every mechanism (ACK and NACK at both
// layers, parity error, replay, both header types) is counted and must occur
// at least once. An error-free packet must take the same number of clocks
// from acceptance to data_out every time (LATENCY).
module tb_pcie_v3;
  localparam int NPKT = 40;
  localparam int LATENCY = 283;  // 14 bytes x 19 link clocks + 17 clocks of pipeline
  logic clk = 0, rst_n = 0;
  logic [31:0] data_in = '0, data_out;
  logic data_valid = 0, is_cpl = 0, tx_ready, data_out_valid, rx_is_cpl;
  logic ack_tl, nack_tl, ack_dl, nack_dl, phy_err;
  logic link_flip = 0, tl_corrupt = 0;
  logic [32:0] exp_q [$], e;
  int checks = 0, failures = 0, cyc = 0, t_acc = 0, nrx = 0, lat = -1;
  int n_ack_tl = 0, n_nack_tl = 0, n_ack_dl = 0, n_nack_dl = 0, n_phy = 0, n_req = 0, n_cpl = 0;
  bit clean;
  always #5 clk = ~clk;
  pcie_v3 dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      n_ack_tl += int'(ack_tl); n_nack_tl += int'(nack_tl);
      n_ack_dl += int'(ack_dl); n_nack_dl += int'(nack_dl); n_phy += int'(phy_err);
      if (nack_tl || nack_dl || phy_err) clean = 0;
      if (data_out_valid) begin
        nrx++;
        e = exp_q.pop_front();
        check(data_out == e[31:0] && rx_is_cpl == e[32],
              $sformatf("packet %0d: got %h/%b exp %h/%b", nrx, data_out, rx_is_cpl, e[31:0], e[32]));
        if (rx_is_cpl) n_cpl++; else n_req++;
        if (clean) begin
          if (lat < 0) $display("error-free latency %0d clocks", cyc - t_acc);
          lat = cyc - t_acc;
          check(lat == LATENCY, $sformatf("latency %0d, expected %0d", lat, LATENCY));
        end
      end
    end
  end
  initial begin
    repeat (NPKT * 1500) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < NPKT; n++) begin
      int mode;
      mode = (n < 2) ? 0 : $urandom_range(0, 3);   // 0/1 clean, 2 link error, 3 end-to-end error
      #1;
      while (!tx_ready) begin @(posedge clk); #1; end
      data_in = (n == 0) ? 32'h3333_3333 : $urandom; is_cpl = $urandom_range(0, 1) != 0;
      tl_corrupt = (mode == 3);
      data_valid = 1; exp_q.push_back({is_cpl, data_in});
      @(posedge clk);
      t_acc = cyc + 1; clean = 1;
      #1 data_valid = 0; tl_corrupt = 0;
      if (mode == 2) begin
        repeat ($urandom_range(10, 200)) @(posedge clk);
        #1 link_flip = 1; @(posedge clk); #1 link_flip = 0;
      end
      while (exp_q.size() != 0) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(nrx == NPKT, $sformatf("%0d of %0d packets delivered", nrx, NPKT));
    $display("mechanisms: ack_tl %0d nack_tl %0d ack_dl %0d nack_dl %0d phy_err %0d request %0d completion %0d",
             n_ack_tl, n_nack_tl, n_ack_dl, n_nack_dl, n_phy, n_req, n_cpl);
    check(n_ack_tl == NPKT, "one ack_tl per packet");
    check(n_nack_tl > 0, "end-to-end NACK and replay happened");
    check(n_nack_dl > 0, "link NACK and replay happened");
    check(n_phy > 0, "parity error happened");
    check(n_ack_dl == n_ack_tl + n_nack_tl, "every frame that passed the link reached the ECRC check");
    check(n_req > 0 && n_cpl > 0, "both header types carried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
