// tb_two_nodes: two StarT-jr adapters joined by one Arctic cable, both at full size.
// Node 0's transmit half drives node 1's receive half and the other way round; each
// node's BUFFER_FREE travels back beside the data it answers. The nodes run on their
// own clocks (close to, but not the same as, each other), so every crossing sees real
// drift. A service-processor model per node drives its local bus.
// The run:
//   1. both nodes leave NIC reset, send the throw-away packet that puts the cable
//      into the idle state, then enable reception with the two-word command;
//   2. one-way latency: a maximum (24 word) high priority packet from node 0 to node
//      1, timed from the SP's last-word write to the packet being visible in node 1's
//      HPRF, checked against bounds worked out from the clock periods: the packet is
//      stored whole three times (Squall FIFO to NIC transmit FIFO at 20 MHz, cable at
//      40 Mword/s, NIC receive FIFO to HPRF at 20 MHz), plus the synchronizers;
//   3. ping-pong round trip: node 1's SP echoes the packet back and node 0 receives it;
//      the hardware share of a round trip is reported;
//   4. bidirectional traffic: each node sends 40 packets of random priority and
//      length (2..24 words) to the other while also reading what arrives; every packet
//      is compared word for word and in order per priority.
module tb_two_nodes;
  import startjr_pkg::*;
  localparam realtime T_LB0 = 30.0, T_LB1 = 31.0, T_NIC0 = 50.0, T_NIC1 = 50.3, T_TX0 = 12.5, T_TX1 = 12.45;
  localparam int NPKT = 40;

  logic clk_lb [2], clk_nic [2], clk_tx [2];
  logic rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous resets act at once
  initial begin clk_lb[0] = 0; forever #(T_LB0 / 2) clk_lb[0] = ~clk_lb[0]; end
  initial begin clk_lb[1] = 0; forever #(T_LB1 / 2) clk_lb[1] = ~clk_lb[1]; end
  initial begin clk_nic[0] = 0; forever #(T_NIC0 / 2) clk_nic[0] = ~clk_nic[0]; end
  initial begin clk_nic[1] = 0; forever #(T_NIC1 / 2) clk_nic[1] = ~clk_nic[1]; end
  initial begin clk_tx[0] = 0; forever #(T_TX0 / 2) clk_tx[0] = ~clk_tx[0]; end
  initial begin clk_tx[1] = 0; forever #(T_TX1 / 2) clk_tx[1] = ~clk_tx[1]; end

  logic        sp_sel [2], sp_we [2];
  logic [15:0] sp_addr [2];
  logic [31:0] sp_wdata [2], sp_rdata [2];
  logic        irq_acd [2], irq_nic [2];
  logic        gsm_ready [2];
  logic [31:0] gsm_rdata [2];
  logic        c_clk [2], c_phase [2], c_frame [2], c_bf [2];
  logic [15:0] c_data [2];
  int checks = 0, failures = 0;

  initial for (int n = 0; n < 2; n++) begin
    sp_sel[n] = 0; sp_we[n] = 0; sp_addr[n] = '0; sp_wdata[n] = '0;
  end

  // node n transmits on cable side n and receives on side 1-n
  for (genvar n = 0; n < 2; n++) begin : g_node
    startjr_node u_node (
      .clk_lb(clk_lb[n]), .clk_nic(clk_nic[n]), .clk_tx(clk_tx[n]), .rst_n,
      .sp_sel(sp_sel[n]), .sp_we(sp_we[n]), .sp_addr(sp_addr[n]), .sp_wdata(sp_wdata[n]),
      .sp_rdata(sp_rdata[n]), .irq_acd(irq_acd[n]), .irq_nic(irq_nic[n]),
      .gsm_req(1'b0), .gsm_we(1'b0), .gsm_addr(32'h0), .gsm_wdata(32'h0),
      .gsm_ready(gsm_ready[n]), .gsm_rdata(gsm_rdata[n]),
      .tx_clk_out(c_clk[n]), .tx_data(c_data[n]), .tx_phase(c_phase[n]), .tx_frame(c_frame[n]),
      .tx_bf(c_bf[n]),
      .rx_clk(c_clk[1-n]), .rx_data(c_data[1-n]), .rx_phase(c_phase[1-n]), .rx_frame(c_frame[1-n]),
      .rx_bf(c_bf[1-n]));
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (70000) @(posedge clk_lb[0]);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- SP models
  localparam logic [15:0] MP = 16'h1000;
  task automatic spw(input int n, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk_lb[n]); sp_sel[n] = 1; sp_we[n] = 1; sp_addr[n] = a; sp_wdata[n] = d;
    @(negedge clk_lb[n]); sp_sel[n] = 0; sp_we[n] = 0;
  endtask
  task automatic spr(input int n, input logic [15:0] a, output logic [31:0] d);
    @(negedge clk_lb[n]); sp_sel[n] = 1; sp_we[n] = 0; sp_addr[n] = a;
    @(negedge clk_lb[n]); sp_sel[n] = 0; d = sp_rdata[n];
  endtask
  // packet: header {0, priority, 14'0, id, length}, then payload words
  function automatic void make_pkt(output logic [31:0] w [$], input bit hp, input int len, input logic [7:0] id);
    w.delete();
    w.push_back({1'b0, hp, 14'd0, id, 8'(len)});
    for (int i = 1; i < len; i++) w.push_back({id, 24'($urandom)});
  endfunction
  task automatic put(input int n, input bit hp, input logic [31:0] w [$]);
    foreach (w[k]) spw(n, MP + (hp ? 0 : 2) + ((k == w.size() - 1) ? 1 : 0), w[k]);
  endtask
  // read one whole packet, its length taken from the header
  task automatic get(input int n, input bit hp, output logic [31:0] w [$]);
    logic [31:0] v; int len;
    w.delete();
    spr(n, MP + (hp ? 4 : 5), v); w.push_back(v);
    len = int'(v[7:0]);
    for (int i = 1; i < len; i++) begin spr(n, MP + (hp ? 4 : 5), v); w.push_back(v); end
  endtask
  task automatic wait_pkt(input int n, input bit hp, output bit ok);
    logic [31:0] st; int t = 0;
    do begin spr(n, MP + 6, st); t++; end while ((hp ? st[3] : st[2]) && t < 5000);
    ok = t < 5000;
  endtask
  task automatic enable_rx(input int n);
    logic [31:0] r [$], v; bit ok;
    put(n, 1, '{32'h8000_0000 | 32'(REG_RX_ENABLE), 32'h1});
    wait_pkt(n, 1, ok);
    spr(n, MP + 4, v); r.push_back(v); spr(n, MP + 4, v); r.push_back(v);
    chk(ok && r[0] == resp_id(REG_RX_ENABLE), $sformatf("node %0d enable command answered", n));
  endtask

  // ---------------------------------------------------------------- traffic
  logic [31:0] expect_q [2][2][$][$];   // [receiving node][hp] queue of packets
  int sent [2], rcvd [2];

  task automatic node_traffic(input int n);
    logic [31:0] p [$], r [$], st;
    bit hp;
    int len;
    sent[n] = 0; rcvd[n] = 0;
    while (sent[n] < NPKT || rcvd[n] < NPKT) begin
      spr(n, MP + 6, st);
      if (sent[n] < NPKT) begin
        hp  = $urandom_range(0, 2) == 0;
        len = $urandom_range(2, MAX_PKT_WORDS);
        if (!(hp ? st[1] : st[0])) begin
          make_pkt(p, hp, len, 8'(n * 128 + sent[n]));
          expect_q[1-n][hp].push_back(p);
          put(n, hp, p);
          sent[n]++;
        end
      end
      for (int h = 1; h >= 0; h--)
        if (!(h ? st[3] : st[2])) begin
          get(n, h[0], r);
          chk(expect_q[n][h].size() > 0 && r == expect_q[n][h][0],
              $sformatf("node %0d received packet %0d (%s) intact and in order", n, rcvd[n], h ? "HP" : "LP"));
          if (expect_q[n][h].size() > 0) void'(expect_q[n][h].pop_front());
          rcvd[n]++;
        end
    end
  endtask

  initial begin
    logic [31:0] p [$], r [$], v;
    bit ok;
    realtime t0, t1, t2, one_way, lo, hi;
    repeat (4) @(negedge clk_lb[0]); rst_n = 1;
    repeat (4) @(negedge clk_lb[0]);

    // ---- 1. initialization of both nodes
    fork
      begin spw(0, MP + 6, 32'h0); repeat (5) @(negedge clk_lb[0]); make_pkt(p, 1, 2, 8'hF0); put(0, 1, p); end
      begin spw(1, MP + 6, 32'h0); repeat (5) @(negedge clk_lb[1]); put(1, 1, '{32'h4000_F102, 32'h0}); end
    join
    repeat (200) @(negedge clk_lb[0]);
    spr(1, MP + 6, v); chk(v[3] == 1, "throw-away packet ignored while reception is off");
    fork enable_rx(0); enable_rx(1); join

    // ---- 2. one-way latency of a maximum packet
    make_pkt(p, 1, MAX_PKT_WORDS, 8'h11);
    put(0, 1, p);
    t0 = $realtime;
    wait (g_node[1].u_node.u_mphi.hprf_empty == 1'b0);
    t1 = $realtime;
    one_way = t1 - t0;
    // stored whole three times plus the cable; synchronizers add a few clocks each
    lo = 2 * MAX_PKT_WORDS * T_NIC0 + MAX_PKT_WORDS * 2 * T_TX0;
    hi = 2 * (MAX_PKT_WORDS + 3) * T_NIC0 + (MAX_PKT_WORDS + 2) * 2 * T_TX0
         + 12 * T_NIC0 + 8 * T_TX0 + 4 * T_LB0;
    $display("one-way latency, 24-word packet: %0.0f ns (bounds %0.0f..%0.0f ns)", one_way, lo, hi);
    chk(one_way >= lo && one_way <= hi, "one-way hardware latency within bounds");

    // ---- 3. ping-pong: node 1 echoes the packet back
    get(1, 1, r);
    chk(r == p, "node 1 received the packet");
    put(1, 1, r);
    wait_pkt(0, 1, ok);
    t2 = $realtime;
    get(0, 1, r);
    chk(ok && r == p, "echo returned to node 0");
    $display("round trip with SP model handling at node 1: %0.0f ns", t2 - t0);
    chk(t2 - t0 < 35us, "hardware round trip far inside the 35 us measured with software");

    // ---- 4. bidirectional traffic
    fork node_traffic(0); node_traffic(1); join
    chk(expect_q[0][0].size() == 0 && expect_q[0][1].size() == 0 &&
        expect_q[1][0].size() == 0 && expect_q[1][1].size() == 0, "every packet delivered");
    chk(!irq_nic[0] && !irq_nic[1], "no link errors between the nodes");
    $display("bidirectional: node 0 sent %0d received %0d, node 1 sent %0d received %0d",
             sent[0], rcvd[0], sent[1], rcvd[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
