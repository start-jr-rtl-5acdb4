// tb_arctic_nic: the Arctic NIC with its cable looped back (transmit outputs wired to
// its own receive inputs, as with two nodes joined by a cable), the Squall FIFOs
// modelled by testbench queues on the 20 MHz side. Clocks: 20 MHz core, 80 MHz
// transmit; the receive clock is the looped-back transmit clock.
// Follows the initialization the card needs: one throw-away packet so the cable
// carries the idle pattern, then the receive-enable command. Then checks that high and
// low priority packets come back intact into HPRF and LPRF, that a long stream of
// maximum high priority packets keeps flowing on three router buffers (BUFFER_FREE
// round trip) at between 40 and 50 percent of the 160 MB/s cable rate (the
// document: a little less than half), and that a bit flipped on the
// cable is caught by the CRC: the packet is dropped, irq rises, the error register
// reads back through the enable command, and reception works again afterwards.
module tb_arctic_nic;
  import startjr_pkg::*;
  logic clk = 0, clk_tx = 0, arst_n = 1;
  initial #1 arst_n = 0;  // a real falling edge, so the asynchronous resets act at once
  always #25 clk = ~clk;
  always #6.25 clk_tx = ~clk_tx;

  logic [32:0] hptf_data, lptf_data; logic hptf_empty, lptf_empty, hptf_rd, lptf_rd;
  logic hprf_wr, hprf_commit, hprf_abort, lprf_wr, lprf_commit, lprf_abort;
  logic [32:0] hprf_wdata, lprf_wdata;
  logic hprf_full = 0, lprf_full = 0;
  logic [9:0] hprf_free;
  logic tx_clk_out, tx_phase, tx_frame, tx_bf; logic [15:0] tx_data;
  logic rx_clk, rx_phase, rx_frame, rx_bf; logic [15:0] rx_data;
  logic irq; nic_err_t err_reg;
  logic flip = 0;
  int checks = 0, failures = 0;

  assign rx_clk   = tx_clk_out;
  assign rx_data  = tx_data ^ {15'd0, flip};
  assign rx_phase = tx_phase;
  assign rx_frame = tx_frame;
  assign rx_bf    = tx_bf;

  arctic_nic dut (.*);

  logic [32:0] hptf_q [$], lptf_q [$];
  assign hptf_empty = hptf_q.size() == 0; assign hptf_data = hptf_empty ? '0 : hptf_q[0];
  assign lptf_empty = lptf_q.size() == 0; assign lptf_data = lptf_empty ? '0 : lptf_q[0];
  always @(posedge clk) begin
    bit ph, pl;
    ph = hptf_rd && !hptf_empty; pl = lptf_rd && !lptf_empty;
    #1;
    if (ph) void'(hptf_q.pop_front());
    if (pl) void'(lptf_q.pop_front());
  end
  logic [32:0] hprf_p [$], hprf_c [$], lprf_p [$], lprf_c [$];
  assign hprf_free = 10'(512 - hprf_c.size() - hprf_p.size());
  always @(posedge clk) begin
    if (hprf_abort) hprf_p.delete();
    else begin
      if (hprf_wr) hprf_p.push_back(hprf_wdata);
      if (hprf_commit) begin foreach (hprf_p[k]) hprf_c.push_back(hprf_p[k]); hprf_p.delete(); end
    end
    if (lprf_abort) lprf_p.delete();
    else begin
      if (lprf_wr) lprf_p.push_back(lprf_wdata);
      if (lprf_commit) begin
        foreach (lprf_p[k]) lprf_c.push_back(lprf_p[k]);
        lprf_p.delete();
      end
    end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", msg); end
  endtask
  function automatic void make_pkt(output logic [31:0] w [$], input bit hp, input int len, input logic [7:0] id);
    w.delete();
    w.push_back({1'b0, hp, 14'd0, id, 8'(len)});
    for (int i = 1; i < len; i++) w.push_back({id, 24'($urandom)});
  endfunction
  task automatic push_tx(input bit hp, input logic [31:0] w [$]);
    foreach (w[k]) begin
      if (hp) hptf_q.push_back({1'(k == w.size() - 1), w[k]});
      else    lptf_q.push_back({1'(k == w.size() - 1), w[k]});
    end
  endtask
  task automatic wait_until(ref logic [32:0] q [$], input int n, input int limit);
    int t = 0;
    while (q.size() < n && t < limit) begin @(negedge clk); t++; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p [$], cmd [$], sent [$][$];
    time t_start;
    repeat (4) @(negedge clk); arst_n = 1;
    repeat (4) @(negedge clk);
    // 1. throw-away packet so the cable carries idle, 2. receive enable
    make_pkt(p, 1, 2, 8'h00); push_tx(1, p);
    repeat (20) @(negedge clk);
    chk(hprf_c.size() == 0, "packet sent before enable is not received");
    cmd = '{32'h8000_0000 | 32'(REG_RX_ENABLE), 32'h1};
    push_tx(1, cmd);
    wait_until(hprf_c, 2, 50);
    chk(hprf_c.size() == 2 && hprf_c[0][31:0] == resp_id(REG_RX_ENABLE), "enable response");
    hprf_c.delete();
    repeat (10) @(negedge clk);

    // HP and LP packets round trip
    make_pkt(p, 1, 7, 8'hA1); push_tx(1, p);
    wait_until(hprf_c, 7, 200);
    chk(hprf_c.size() == 7, $sformatf("HP packet looped back (%0d words)", hprf_c.size()));
    foreach (p[k]) if (k < hprf_c.size()) chk(hprf_c[k][31:0] == p[k], $sformatf("HP word %0d", k));
    hprf_c.delete();

    // LP packets: content check
    for (int n = 0; n < 6; n++) begin make_pkt(p, 0, MAX_PKT_WORDS, 8'(n)); sent.push_back(p); push_tx(0, p); end
    wait_until(lprf_c, 6 * MAX_PKT_WORDS, 2000);
    chk(lprf_c.size() == 6 * MAX_PKT_WORDS, $sformatf("6 LP packets received (%0d words)", lprf_c.size()));
    for (int n = 0; n < 6; n++) for (int k = 0; k < MAX_PKT_WORDS; k++)
      if (n * MAX_PKT_WORDS + k < lprf_c.size())
        chk(lprf_c[n * MAX_PKT_WORDS + k][31:0] == sent[n][k], "LP stream content");
    lprf_c.delete();
    sent.delete();

    // stream of 40 maximum-length HP packets: all three router buffers in use
    for (int n = 0; n < 40; n++) begin make_pkt(p, 1, MAX_PKT_WORDS, 8'(n)); sent.push_back(p); push_tx(1, p); end
    t_start = $time;
    wait_until(hprf_c, 40 * MAX_PKT_WORDS, 5000);
    chk(hprf_c.size() == 40 * MAX_PKT_WORDS, $sformatf("40 HP packets received (%0d words)", hprf_c.size()));
    for (int n = 0; n < 40; n++) for (int k = 0; k < MAX_PKT_WORDS; k++)
      if (n * MAX_PKT_WORDS + k < hprf_c.size())
        chk(hprf_c[n * MAX_PKT_WORDS + k][31:0] == sent[n][k], "HP stream content");
    begin
      real mbs;
      mbs = 40.0 * MAX_PKT_WORDS * 4.0 * 1000.0 / real'($time - t_start);   // bytes per us = MB/s
      $display("stream: %0.1f MB/s payload", mbs);
      chk(mbs > 64.0 && mbs < 80.0, $sformatf("payload rate %0.1f MB/s is 40-50%% of 160 MB/s", mbs));
    end
    hprf_c.delete();

    // a flipped bit on the cable
    make_pkt(p, 1, 10, 8'hEE); push_tx(1, p);
    wait (dut.u_ltx.cable_frame && dut.u_ltx.second);
    repeat (12) @(posedge clk_tx);
    @(negedge clk_tx); flip = 1; @(negedge clk_tx); flip = 0;
    repeat (80) @(negedge clk);
    chk(hprf_c.size() == 0, "corrupted packet not delivered");
    chk(irq && err_reg.crc, "CRC error raises irq");
    cmd = '{32'h8000_0000 | 32'(REG_RX_ENABLE), 32'h1};
    push_tx(1, cmd);
    wait_until(hprf_c, 2, 50);
    chk(hprf_c.size() == 2 && hprf_c[1][3] == 1'b1, "enable command returns the CRC error");
    chk(!irq, "irq cleared");
    hprf_c.delete();
    make_pkt(p, 1, 3, 8'hA2); push_tx(1, p);
    wait_until(hprf_c, 3, 200);
    chk(hprf_c.size() == 3 && hprf_c[2][31:0] == p[2], "reception works after recovery");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
