// tb_arctic_nic_core: the 20 MHz NIC core with every FIFO replaced by a testbench
// model (transmit FIFOs and the NIC receive FIFO as queues holding whole packets,
// receive FIFOs and the NIC transmit FIFO as models honouring commit and abort).
// The CRC reference is a byte-wise CCITT-16 written here.
// Checked: the receive-enable register request (response id and old error register
// in HPRF, enable set, errors cleared); a high priority packet copied with FRAME set,
// followed by the correct CRC word and an idle word, committed together; buffer
// credit accounting (three credits, low priority needs two, high priority may take
// the last, BUFFER_FREE returns one); received packets steered by priority with
// CRC checked, committed and answered with BUFFER_FREE; a full receive FIFO stalling
// the engine and holding back BUFFER_FREE; a bad CRC aborting the packet, setting the
// CRC error, raising irq and dropping the receive enable; PHASE/FRAME/BUFFER_FREE
// events in the error register; the read-error request.
module tb_arctic_nic_core;
  import startjr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous resets act at once
  always #25 clk = ~clk;

  logic [32:0] hptf_data, lptf_data; logic hptf_empty, lptf_empty, hptf_rd, lptf_rd;
  logic hprf_wr, hprf_commit, hprf_abort, lprf_wr, lprf_commit, lprf_abort;
  logic [32:0] hprf_wdata, lprf_wdata;
  logic hprf_full = 0, lprf_full = 0;
  logic [9:0] hprf_free;
  logic ntx_wr, ntx_commit, ntx_full; logic [33:0] ntx_wdata; logic [6:0] ntx_free;
  logic [32:0] nrx_data; logic nrx_empty, nrx_rd;
  logic bf_rcvd = 0, ev_phase = 0, ev_frame = 0, ev_bf = 0;
  logic bf_send, rx_enable, irq; nic_err_t err_reg; logic [1:0] credits;
  int checks = 0, failures = 0;

  arctic_nic_core dut (.*);

  // ---- source queues (FWFT)
  logic [32:0] hptf_q [$], lptf_q [$], nrx_q [$];
  assign hptf_empty = hptf_q.size() == 0; assign hptf_data = hptf_empty ? '0 : hptf_q[0];
  assign lptf_empty = lptf_q.size() == 0; assign lptf_data = lptf_empty ? '0 : lptf_q[0];
  assign nrx_empty  = nrx_q.size() == 0;  assign nrx_data  = nrx_empty ? '0 : nrx_q[0];
  // pops happen just after the edge, so the design samples the old head first
  always @(posedge clk) begin
    bit ph, pl, pn;
    ph = hptf_rd && !hptf_empty; pl = lptf_rd && !lptf_empty; pn = nrx_rd && !nrx_empty;
    #1;
    if (ph) void'(hptf_q.pop_front());
    if (pl) void'(lptf_q.pop_front());
    if (pn) void'(nrx_q.pop_front());
  end
  // ---- sink models
  logic [32:0] hprf_p [$], hprf_c [$], lprf_p [$], lprf_c [$];
  logic [33:0] ntx_p [$], ntx_c [$];
  int n_bf_send = 0, n_aborts = 0;
  assign hprf_free = 10'(512 - hprf_c.size() - hprf_p.size());
  assign ntx_full = 0; assign ntx_free = 7'd64;
  always @(posedge clk) begin
    if (hprf_abort) begin hprf_p.delete(); n_aborts++; end
    else begin
      if (hprf_wr) hprf_p.push_back(hprf_wdata);
      if (hprf_commit) begin foreach (hprf_p[k]) hprf_c.push_back(hprf_p[k]); hprf_p.delete(); end
    end
    if (lprf_abort) begin lprf_p.delete(); n_aborts++; end
    else begin
      if (lprf_wr) lprf_p.push_back(lprf_wdata);
      if (lprf_commit) begin foreach (lprf_p[k]) lprf_c.push_back(lprf_p[k]); lprf_p.delete(); end
    end
    if (ntx_wr) ntx_p.push_back(ntx_wdata);
    if (ntx_commit) begin foreach (ntx_p[k]) ntx_c.push_back(ntx_p[k]); ntx_p.delete(); end
    n_bf_send += int'(bf_send);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", msg); end
  endtask
  function automatic logic [15:0] crc_ref(input logic [31:0] words [$]);
    logic [15:0] c = 16'hFFFF;
    foreach (words[k]) for (int b = 3; b >= 0; b--) begin
      c ^= {words[k][8*b +: 8], 8'h00};
      repeat (8) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction
  function automatic void make_pkt(output logic [31:0] w [$], input bit hp, input int len, input logic [7:0] id);
    w.delete();
    w.push_back({1'b0, hp, 14'd0, id, 8'(len)});
    for (int i = 1; i < len; i++) w.push_back({id, 24'(i * 7)});
  endfunction
  task automatic push_tx(input bit hp, input logic [31:0] w [$]);
    foreach (w[k]) begin
      if (hp) hptf_q.push_back({1'(k == w.size() - 1), w[k]});
      else    lptf_q.push_back({1'(k == w.size() - 1), w[k]});
    end
  endtask
  task automatic push_rx(input logic [31:0] w [$], input bit corrupt = 0);
    logic [15:0] c;
    c = crc_ref(w);
    foreach (w[k]) nrx_q.push_back({1'b0, w[k]});
    nrx_q.push_back({1'b1, 16'h0, corrupt ? ~c : c});
  endtask
  task automatic pulse(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  // checks one transmitted packet at the head of ntx_c
  task automatic expect_tx(input logic [31:0] w [$], input string name);
    chk(ntx_c.size() >= w.size() + 2, {name, ": whole packet in NIC transmit FIFO"});
    if (ntx_c.size() >= w.size() + 2) begin
      foreach (w[k]) chk(ntx_c[k] == {2'b10, w[k]}, $sformatf("%s word %0d %h", name, k, ntx_c[k]));
      chk(ntx_c[w.size()] == {2'b00, 16'h0, crc_ref(w)}, $sformatf("%s CRC word %h", name, ntx_c[w.size()]));
      chk(ntx_c[w.size() + 1] == {2'b01, IDLE_WORD}, {name, ": idle word closes the burst"});
      repeat (w.size() + 2) void'(ntx_c.pop_front());
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p1 [$], p2 [$], p3 [$], p4 [$], r1 [$], r2 [$], r3 [$];
    logic [31:0] cmd [$];
    int t0;
    repeat (3) @(negedge clk); rst_n = 1;
    chk(credits == 3 && !rx_enable, "reset state");
    // receive enable command
    cmd = '{32'h8000_0000 | 32'(REG_RX_ENABLE), 32'h1};
    push_tx(1, cmd);
    repeat (10) @(negedge clk);
    chk(rx_enable, "receive enabled by command");
    chk(hprf_c.size() == 2 && hprf_c[0][31:0] == resp_id(REG_RX_ENABLE) && hprf_c[1] == {1'b1, 32'h0},
        "enable command response in HPRF");
    hprf_c.delete();

    // high priority packet
    make_pkt(p1, 1, 6, 8'h11);
    push_tx(1, p1);
    repeat (12) @(negedge clk);
    expect_tx(p1, "HP packet");
    chk(credits == 2, "one credit spent");

    // three low priority packets: only one may go (needs two credits)
    make_pkt(p2, 0, 3, 8'h21); make_pkt(p3, 0, 24, 8'h22);
    push_tx(0, p2); push_tx(0, p3);
    repeat (40) @(negedge clk);
    expect_tx(p2, "first LP packet");
    chk(ntx_c.size() == 0 && credits == 1, "second LP packet held back by the high priority reserve");
    // a high priority packet may use the last buffer
    make_pkt(p4, 1, 2, 8'h31);
    push_tx(1, p4);
    repeat (10) @(negedge clk);
    expect_tx(p4, "HP packet on the last buffer");
    chk(credits == 0, "no credits left");
    pulse(bf_rcvd);
    repeat (5) @(negedge clk);
    chk(ntx_c.size() == 0 && credits == 1, "one credit is not enough for LP");
    pulse(bf_rcvd);
    t0 = 0;
    while (ntx_c.size() == 0 && t0 < 60) begin @(negedge clk); t0++; end
    repeat (3) @(negedge clk);
    expect_tx(p3, "LP packet after two BUFFER_FREEs");
    chk(credits == 1, "credits after LP packet");

    // receive: HP and LP packets with good CRC
    make_pkt(r1, 1, 5, 8'h41); make_pkt(r2, 0, 24, 8'h42);
    push_rx(r1); push_rx(r2);
    repeat (40) @(negedge clk);
    chk(hprf_c.size() == 5 && lprf_c.size() == 24, $sformatf("received packets steered: %0d %0d", hprf_c.size(), lprf_c.size()));
    foreach (r1[k]) if (k < hprf_c.size()) chk(hprf_c[k][31:0] == r1[k], "HPRF content");
    foreach (r2[k]) if (k < lprf_c.size()) chk(lprf_c[k][31:0] == r2[k], "LPRF content");
    chk(n_bf_send == 2, "BUFFER_FREE sent for each packet");
    hprf_c.delete(); lprf_c.delete();

    // LPRF full: engine stalls and withholds BUFFER_FREE
    lprf_full = 1;
    make_pkt(r3, 0, 4, 8'h43);
    push_rx(r3);
    repeat (20) @(negedge clk);
    chk(lprf_c.size() == 0 && n_bf_send == 2, "full LPRF stalls, no BUFFER_FREE");
    lprf_full = 0;
    repeat (10) @(negedge clk);
    chk(lprf_c.size() == 4 && n_bf_send == 3, "packet delivered once room appears");

    // bad CRC
    push_rx(r1, 1);
    repeat (12) @(negedge clk);
    chk(hprf_c.size() == 0 && n_aborts == 1, "bad packet aborted");
    chk(err_reg.crc && irq && !rx_enable, "CRC error flagged, irq, receive disabled");
    chk(n_bf_send == 3, "no BUFFER_FREE for a bad packet");

    // link error events
    pulse(ev_phase); pulse(ev_bf);
    repeat (2) @(negedge clk);
    chk(err_reg == 4'b1110, $sformatf("error register %b", err_reg));
    pulse(ev_frame);
    repeat (2) @(negedge clk);
    chk(err_reg == 4'b1111, "FRAME error recorded");
    // read-error request leaves the register alone
    cmd = '{32'h8000_0000 | 32'(REG_READ_ERR)};
    push_tx(1, cmd);
    repeat (8) @(negedge clk);
    chk(hprf_c.size() == 2 && hprf_c[1][3:0] == 4'b1111 && err_reg == 4'b1111, "read-error response");
    hprf_c.delete();
    // enable command returns and clears
    cmd = '{32'h8000_0000 | 32'(REG_RX_ENABLE), 32'h1};
    push_tx(1, cmd);
    repeat (10) @(negedge clk);
    chk(hprf_c.size() == 2 && hprf_c[1][3:0] == 4'b1111, "enable returns old errors");
    chk(err_reg == 0 && !irq && rx_enable && credits == 3, "errors cleared, enabled, credits reloaded");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
