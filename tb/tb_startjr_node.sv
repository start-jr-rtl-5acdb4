// tb_startjr_node: one StarT-jr adapter, end to end, at its full size.
// The Arctic cable is looped back onto the node itself (as two nodes joined by a
// cable), with hooks to corrupt a data bit, the PHASE, FRAME or BUFFER_FREE line for
// one cycle. A service-processor model drives the local bus and a PCI-chip model makes
// GSM accesses that give up after 12 cycles (a PCI retry).
// The run: leave NIC reset, send the throw-away packet, enable reception; high and low
// priority messages round trip through HPTF/LPTF -> cable -> HPRF/LPRF; a burst of low
// priority packets that waits for router buffers; 25 maximum low priority packets
// while the SP does not read LPRF, so LPRF fills and BUFFER_FREE is withheld until
// the SP drains it; each of the four link errors in turn with recovery through the
// enable command; the GSM cache: read hit, read miss serviced by the SP then retried,
// write to an owned line, write into the non-coherent set, split-phase read.
// Every mechanism is counted and a mechanism that never happened counts as a failure.
module tb_startjr_node;
  import startjr_pkg::*;
  logic clk_lb = 0, clk_nic = 0, clk_tx = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous resets act at once
  always #15 clk_lb = ~clk_lb;     // local bus
  always #25 clk_nic = ~clk_nic;   // 20 MHz
  always #6.25 clk_tx = ~clk_tx;   // 80 MHz

  logic sp_sel = 0, sp_we = 0; logic [15:0] sp_addr = '0; logic [31:0] sp_wdata = '0, sp_rdata;
  logic irq_acd, irq_nic;
  logic gsm_req = 0, gsm_we = 0, gsm_ready; logic [31:0] gsm_addr = '0, gsm_wdata = '0, gsm_rdata;
  logic tx_clk_out, tx_phase, tx_frame, tx_bf; logic [15:0] tx_data;
  logic rx_clk, rx_phase, rx_frame, rx_bf; logic [15:0] rx_data;
  logic g_data = 0, g_phase = 0, g_frame = 0, g_bf = 0;
  int checks = 0, failures = 0;

  assign rx_clk   = tx_clk_out;
  assign rx_data  = tx_data ^ {15'd0, g_data};
  assign rx_phase = tx_phase ^ g_phase;
  assign rx_frame = tx_frame ^ g_frame;
  assign rx_bf    = tx_bf ^ g_bf;

  startjr_node dut (.*);

  // ---------------------------------------------------------------- mechanism counters
  int n_hp_msg = 0, n_lp_msg = 0, n_regreq = 0, n_credit_wait = 0, n_rx_full_stall = 0;
  int n_bf_sent = 0, n_crc_err = 0, n_phase_err = 0, n_frame_err = 0, n_bf_err = 0;
  int n_rd_hit = 0, n_wr_hit = 0, n_retry = 0, n_nc_write = 0, n_split = 0;
  always @(posedge clk_nic) begin
    if (dut.u_nic.u_core.start_hp) n_hp_msg++;
    if (dut.u_nic.u_core.start_lp) n_lp_msg++;
    if (dut.u_nic.u_core.start_reg) n_regreq++;
    if (dut.u_nic.u_core.tx_state == 0 && !dut.u_nic.u_core.lptf_empty &&
        dut.u_nic.u_core.hptf_empty && dut.u_nic.u_core.credits < 2) n_credit_wait++;
    if (dut.u_nic.u_core.rx_state == 1 && !dut.u_nic.u_core.nrx_empty &&
        !dut.u_nic.u_core.nrx_data[32] && dut.u_nic.u_core.tgt_full) n_rx_full_stall++;
    if (dut.u_nic.u_core.bf_send) n_bf_sent++;
    if (dut.u_nic.u_core.crc_fail) n_crc_err++;
    if (dut.u_nic.u_core.ev_phase) n_phase_err++;
    if (dut.u_nic.u_core.ev_frame) n_frame_err++;
    if (dut.u_nic.u_core.ev_bf) n_bf_err++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk_lb);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- SP model
  localparam logic [15:0] DP = 16'h0000, MP = 16'h1000, AC = 16'h2000;
  task automatic spw(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk_lb); sp_sel = 1; sp_we = 1; sp_addr = a; sp_wdata = d;
    @(negedge clk_lb); sp_sel = 0; sp_we = 0;
  endtask
  task automatic spr(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk_lb); sp_sel = 1; sp_we = 0; sp_addr = a;
    @(negedge clk_lb); sp_sel = 0; d = sp_rdata;
  endtask
  task automatic send(input bit hp, input logic [31:0] w [$]);
    logic [31:0] st;
    do spr(MP + 6, st); while (hp ? st[1] : st[0]);    // wait for room for a packet
    foreach (w[k]) spw(MP + (hp ? 0 : 2) + ((k == w.size() - 1) ? 1 : 0), w[k]);
  endtask
  // wait for a packet in HPRF (hp) or LPRF and read n words
  task automatic recv(input bit hp, input int n, output logic [31:0] w [$], output bit ok);
    logic [31:0] st, v; int t = 0;
    w.delete();
    do begin spr(MP + 6, st); t++; end while ((hp ? st[3] : st[2]) && t < 3000);
    ok = (t < 3000);
    if (ok) for (int i = 0; i < n; i++) begin spr(MP + (hp ? 4 : 5), v); w.push_back(v); end
  endtask
  function automatic void make_pkt(output logic [31:0] w [$], input bit hp, input int len, input logic [7:0] id);
    w.delete();
    w.push_back({1'b0, hp, 14'd0, id, 8'(len)});
    for (int i = 1; i < len; i++) w.push_back({id, 24'($urandom)});
  endfunction
  task automatic enable_rx(output logic [31:0] errs);
    logic [31:0] r [$]; bit ok;
    send(1, '{32'h8000_0000 | 32'(REG_RX_ENABLE), 32'h1});
    recv(1, 2, r, ok);
    chk(ok && r[0] == resp_id(REG_RX_ENABLE), "enable command answered");
    errs = ok ? r[1] : 32'hFFFF_FFFF;
  endtask
  task automatic roundtrip(input bit hp, input int len, input logic [7:0] id, input string name);
    logic [31:0] p [$], r [$]; bit ok;
    make_pkt(p, hp, len, id);
    send(hp, p);
    recv(hp, len, r, ok);
    chk(ok && r == p, name);
  endtask

  // ---------------------------------------------------------------- PCI chip model
  task automatic gsm(input bit we, input logic [31:0] a, input logic [31:0] d,
                     output bit done, output logic [31:0] rd);
    @(negedge clk_lb); gsm_req = 1; gsm_we = we; gsm_addr = a; gsm_wdata = d; done = 0;
    for (int i = 0; i < 12; i++) begin
      @(posedge clk_lb); #1;
      if (gsm_ready) begin done = 1; rd = gsm_rdata; break; end
    end
    @(negedge clk_lb); gsm_req = 0;
    if (!done) n_retry++;
    repeat (2) @(negedge clk_lb);
  endtask
  function automatic logic [31:0] tagword(input logic [31:0] a, input bit r, w, nc, iw, ir);
    tagctl_t t;
    t = '0; t.tag = a[26:12]; t.r = r; t.w = w; t.nc = nc; t.iw = iw; t.ir = ir;
    return t;
  endfunction

  // glitch one cable line during the first half of a pair: inside a packet (FRAME
  // true) for data, PHASE and FRAME, anywhere for BUFFER_FREE
  task automatic glitch(input int which);
    if (which < 3) begin
      do @(negedge clk_tx); while (!(tx_frame && !tx_phase));
      repeat (6) @(negedge clk_tx);
      while (tx_phase) @(negedge clk_tx);
    end else begin
      do @(negedge clk_tx); while (tx_phase);
    end
    case (which)
      0: g_data = 1; 1: g_phase = 1; 2: g_frame = 1; default: g_bf = 1;
    endcase
    @(negedge clk_tx);
    {g_data, g_phase, g_frame, g_bf} = '0;
  endtask

  initial begin
    logic [31:0] v, errs, p [$], r [$], big [$][$];
    bit ok, done;
    repeat (4) @(negedge clk_lb); rst_n = 1;
    repeat (4) @(negedge clk_lb);
    spr(MP + 6, v);
    chk(v[8] == 1, "NIC in reset after power-up");
    spw(MP + 6, 32'h0);
    repeat (10) @(negedge clk_lb);

    // ---- NIC initialization
    make_pkt(p, 1, 2, 8'h00); send(1, p);
    repeat (100) @(negedge clk_lb);
    spr(MP + 6, v); chk(v[3] == 1, "throw-away packet not received");
    enable_rx(errs);

    // ---- messages
    roundtrip(1, 5, 8'h01, "HP message round trip");
    roundtrip(0, 9, 8'h02, "LP message round trip");
    roundtrip(1, MAX_PKT_WORDS, 8'h03, "HP maximum message");

    // ---- LP burst waits for router buffers
    for (int n = 0; n < 4; n++) begin make_pkt(p, 0, MAX_PKT_WORDS, 8'(16 + n)); big.push_back(p); send(0, p); end
    for (int n = 0; n < 4; n++) begin recv(0, MAX_PKT_WORDS, r, ok); chk(ok && r == big[n], "LP burst packet"); end
    big.delete();

    // ---- LPRF fills: BUFFER_FREE withheld until the SP drains it
    for (int n = 0; n < 25; n++) begin make_pkt(p, 0, MAX_PKT_WORDS, 8'(32 + n)); big.push_back(p); send(0, p); end
    repeat (3000) @(negedge clk_lb);
    chk(n_rx_full_stall > 0, "receive engine stalled on full LPRF");
    for (int n = 0; n < 25; n++) begin recv(0, MAX_PKT_WORDS, r, ok); chk(ok && r == big[n], $sformatf("LP packet %0d after drain", n)); end
    big.delete();

    // ---- link errors, each followed by recovery
    for (int e = 0; e < 4; e++) begin
      make_pkt(p, 1, 12, 8'(64 + e));
      fork
        send(1, p);
        glitch(e);
      join
      repeat (300) @(negedge clk_lb);
      chk(irq_nic, $sformatf("link error %0d raises irq", e));
      if (e < 3) begin
        spr(MP + 6, v); chk(v[3] == 1, $sformatf("no packet delivered after link error %0d", e));
      end else begin
        recv(1, 12, r, ok); chk(ok && r == p, "packet survives a BUFFER_FREE error");
      end
      spw(MP + 6, 32'h200); spw(MP + 6, 32'h0);    // reset Squall FIFOs
      repeat (20) @(negedge clk_lb);
      enable_rx(errs);
      chk(errs[3:0] == (e == 0 ? 4'b1000 : e == 1 ? 4'b0010 : e == 2 ? 4'b0001 : 4'b0100),
          $sformatf("error register after link error %0d: %b", e, errs[3:0]));
      chk(!irq_nic, "irq cleared after enable");
      roundtrip(1, 4, 8'(80 + e), "messages flow after recovery");
    end

    // ---- global shared memory
    begin
      logic [31:0] a_hit, a_miss, a_nc, a_split, a_own;
      a_hit = GSM_BASE | (32'h0012 << 12) | (32'd7 << 3);
      a_miss = GSM_BASE | (32'h0013 << 12) | (32'd8 << 3) | 4;
      a_own  = GSM_BASE | (32'h0014 << 12) | (32'd9 << 3);
      a_nc   = GSM_BASE | (32'h0015 << 12) | (32'd10 << 3);
      a_split = GSM_BASE | (32'h0016 << 12) | (32'd11 << 3);
      // SP fills tag space: every line of set 0 is readable for a_hit's line only
      spw(DP + 16'(dp_tag_addr(0, 7)), tagword(a_hit, 1, 0, 0, 0, 0));
      spw(DP + 16'(dp_tag_addr(1, 7)), 32'h0);
      spw(DP + 16'(dp_data_addr(0, 7, 0)), 32'h1234_5678);
      spw(DP + 16'(dp_tag_addr(0, 8)), 32'h0);
      spw(DP + 16'(dp_tag_addr(1, 8)), 32'h0);
      spw(DP + 16'(dp_tag_addr(0, 9)), 32'h0);
      spw(DP + 16'(dp_tag_addr(1, 9)), tagword(a_own, 1, 1, 0, 0, 0));
      spw(DP + 16'(dp_tag_addr(0, 10)), tagword(GSM_BASE | (32'h7FFF << 12), 0, 0, 1, 0, 0));
      spw(DP + 16'(dp_tag_addr(1, 10)), 32'h0);
      spw(DP + 16'(dp_tag_addr(0, 11)), 32'h0);
      spw(DP + 16'(dp_tag_addr(1, 11)), 32'h0);
      spw(AC + 3, 32'h1);

      gsm(0, a_hit, 0, done, v);
      chk(done && v == 32'h1234_5678, "GSM read hit"); if (done) n_rd_hit++;
      // miss: retried, SP services it and the retry hits
      gsm(0, a_miss, 0, done, v);
      chk(!done && irq_acd, "GSM read miss retried with interrupt");
      spr(AC + 0, v); chk(v == a_miss, "ACD captured the miss address");
      spw(DP + 16'(dp_data_addr(1, 8, 1)), 32'hCAFE_0001);
      spw(DP + 16'(dp_tag_addr(1, 8)), tagword(a_miss, 1, 0, 0, 0, 0));
      spw(AC + 3, 32'h1);
      gsm(0, a_miss, 0, done, v);
      chk(done && v == 32'hCAFE_0001, "GSM read hit after service"); if (done) n_rd_hit++;
      // owned line
      gsm(1, a_own, 32'h0BAD_F00D, done, v);
      chk(done && !irq_acd, "GSM write to owned line"); if (done) n_wr_hit++;
      spr(DP + 16'(dp_data_addr(1, 9, 0)), v); chk(v == 32'h0BAD_F00D, "owned write data in set 1");
      // non-coherent set accepts a write to another block and interrupts
      gsm(1, a_nc, 32'h4444_5555, done, v);
      chk(done && irq_acd, "GSM write accepted by the non-coherent set"); if (done) n_nc_write++;
      spr(AC + 1, v); chk(v[2:0] == CAUSE_WR_NC, "cause: non-coherent write");
      spr(DP + 16'(dp_data_addr(0, 10, 0)), v); chk(v == 32'h4444_5555, "SP retrieves the write data");
      spw(AC + 3, 32'h1);
      // split-phase read: the SP returns the miss pattern with interrupt-on-read
      gsm(0, a_split, 0, done, v);
      chk(!done, "split-phase read first misses");
      spw(DP + 16'(dp_data_addr(0, 11, 0)), 32'hDEAD_DEAD);
      spw(DP + 16'(dp_tag_addr(0, 11)), tagword(a_split, 1, 0, 0, 0, 1));
      spw(AC + 3, 32'h1);
      gsm(0, a_split, 0, done, v);
      chk(done && v == 32'hDEAD_DEAD && irq_acd, "retry returns the miss pattern and interrupts");
      if (done && irq_acd) n_split++;
      spw(DP + 16'(dp_tag_addr(0, 11)), 32'h0);   // SP revokes read access
      spw(AC + 3, 32'h1);
      gsm(0, a_split, 0, done, v);
      chk(!done, "read access revoked after split-phase read");
      spw(AC + 3, 32'h1);
    end

    $display("mechanisms: hp=%0d lp=%0d regreq=%0d credit_wait=%0d rx_full_stall=%0d bf_sent=%0d",
             n_hp_msg, n_lp_msg, n_regreq, n_credit_wait, n_rx_full_stall, n_bf_sent);
    $display("            crc=%0d phase=%0d frame=%0d bf=%0d rd_hit=%0d wr_hit=%0d retry=%0d nc=%0d split=%0d",
             n_crc_err, n_phase_err, n_frame_err, n_bf_err, n_rd_hit, n_wr_hit, n_retry, n_nc_write, n_split);
    chk(n_hp_msg > 0, "HP messages sent");
    chk(n_lp_msg > 0, "LP messages sent");
    chk(n_regreq > 0, "register requests");
    chk(n_credit_wait > 0, "LP packet waited for router buffers");
    chk(n_rx_full_stall > 0, "receive FIFO full stall");
    chk(n_bf_sent > 0, "BUFFER_FREE sent");
    chk(n_crc_err > 0, "CRC error");
    chk(n_phase_err > 0, "PHASE error");
    chk(n_frame_err > 0, "FRAME error");
    chk(n_bf_err > 0, "BUFFER_FREE error");
    chk(n_rd_hit > 0 && n_wr_hit > 0, "GSM hits");
    chk(n_retry > 0, "GSM retries");
    chk(n_nc_write > 0, "non-coherent write");
    chk(n_split > 0, "split-phase read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
