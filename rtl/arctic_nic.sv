// arctic_nic: the Arctic Switch Fabric network interface card.
//
// Three clock domains, as on the card:
//   clk      20 MHz: arctic_nic_core (CRC, buffer counting, register requests) and the
//            NIC side of the Squall module FIFOs;
//   clk_tx   80 MHz generated on the card and sent down the cable with the data:
//            arctic_link_tx, reading the NIC transmit FIFO once per pair (40 MHz);
//   rx_clk   80 MHz received from the cable: arctic_link_rx, writing the NIC receive
//            FIFO once per pair.
// The NIC transmit FIFO (core -> clk_tx) and receive FIFO (rx_clk -> core) are
// pkt_fifo instances; BUFFER_FREE requests (core -> clk_tx), BUFFER_FREE receipts and
// the three link error events (rx_clk -> core) cross in gray_event_sync instances, and
// the receive enable crosses to rx_clk in a two-flop synchronizer. Each domain has its
// own reset synchronizer driven by arst_n (power-on reset and the Squall control
// register's NIC reset bit).
// Depths: the transmit FIFO holds two maximum packets with their CRC and idle words;
// the receive FIFO holds the three packets the router may send before it runs out of
// buffer credit (3 x 25 words, rounded up). The document gives neither depth.
// Cable outputs are registered in clk_tx; tx_clk_out is the clock that travels with
// them.
module arctic_nic
  import startjr_pkg::*;
#(
  parameter int unsigned NTX_DEPTH = 64,
  parameter int unsigned NRX_DEPTH = 128,
  parameter int unsigned SQ_DEPTH  = 512
) (
  input  logic        clk,
  input  logic        clk_tx,
  input  logic        arst_n,
  // Squall transmit FIFOs, read side
  input  logic [32:0] hptf_data,
  input  logic        hptf_empty,
  output logic        hptf_rd,
  input  logic [32:0] lptf_data,
  input  logic        lptf_empty,
  output logic        lptf_rd,
  // Squall receive FIFOs, write side
  output logic        hprf_wr,
  output logic [32:0] hprf_wdata,
  output logic        hprf_commit,
  output logic        hprf_abort,
  input  logic        hprf_full,
  input  logic [$clog2(SQ_DEPTH):0] hprf_free,
  output logic        lprf_wr,
  output logic [32:0] lprf_wdata,
  output logic        lprf_commit,
  output logic        lprf_abort,
  input  logic        lprf_full,
  // cable, transmit direction
  output logic        tx_clk_out,
  output logic [15:0] tx_data,
  output logic        tx_phase,
  output logic        tx_frame,
  output logic        tx_bf,
  // cable, receive direction
  input  logic        rx_clk,
  input  logic [15:0] rx_data,
  input  logic        rx_phase,
  input  logic        rx_frame,
  input  logic        rx_bf,
  // to the SP
  output logic        irq,
  output nic_err_t    err_reg
);
  logic rst_core_n, rst_tx_n, rst_rx_n;
  rst_sync u_rs_core (.clk(clk),    .arst_n(arst_n), .rst_n(rst_core_n));
  rst_sync u_rs_tx   (.clk(clk_tx), .arst_n(arst_n), .rst_n(rst_tx_n));
  rst_sync u_rs_rx   (.clk(rx_clk), .arst_n(arst_n), .rst_n(rst_rx_n));

  assign tx_clk_out = clk_tx;

  // NIC transmit FIFO
  logic        ntx_wr, ntx_commit, ntx_full, ntx_rd, ntx_empty;
  logic [33:0] ntx_wdata, ntx_rdata;
  logic [$clog2(NTX_DEPTH):0] ntx_free;
  pkt_fifo #(.WIDTH(34), .DEPTH(NTX_DEPTH)) u_ntx (
    .wclk(clk), .wrst_n(rst_core_n), .wr_en(ntx_wr), .wr_data(ntx_wdata),
    .wr_commit(ntx_commit), .wr_abort(1'b0), .wr_full(ntx_full), .wr_free(ntx_free),
    .rclk(clk_tx), .rrst_n(rst_tx_n), .rd_en(ntx_rd), .rd_data(ntx_rdata), .rd_empty(ntx_empty));

  // NIC receive FIFO
  logic        nrx_wr, nrx_commit, nrx_abort, nrx_full, nrx_rd, nrx_empty;
  logic [32:0] nrx_wdata, nrx_rdata;
  logic [$clog2(NRX_DEPTH):0] nrx_free_unused;
  pkt_fifo #(.WIDTH(33), .DEPTH(NRX_DEPTH)) u_nrx (
    .wclk(rx_clk), .wrst_n(rst_rx_n), .wr_en(nrx_wr), .wr_data(nrx_wdata),
    .wr_commit(nrx_commit), .wr_abort(nrx_abort), .wr_full(nrx_full), .wr_free(nrx_free_unused),
    .rclk(clk), .rrst_n(rst_core_n), .rd_en(nrx_rd), .rd_data(nrx_rdata), .rd_empty(nrx_empty));

  // events and levels between domains
  logic bf_send_core, bf_send_tx;
  logic bf_rcvd_rx, bf_rcvd_core;
  logic ephase_rx, ephase_core, eframe_rx, eframe_core, ebf_rx, ebf_core, rx_ovf;
  logic rx_enable_core, rx_enable_rx;

  gray_event_sync u_es_bfsend (.src_clk(clk), .src_rst_n(rst_core_n), .src_ev(bf_send_core),
                               .dst_clk(clk_tx), .dst_rst_n(rst_tx_n), .dst_ev(bf_send_tx));
  gray_event_sync u_es_bfrcvd (.src_clk(rx_clk), .src_rst_n(rst_rx_n), .src_ev(bf_rcvd_rx),
                               .dst_clk(clk), .dst_rst_n(rst_core_n), .dst_ev(bf_rcvd_core));
  gray_event_sync u_es_phase  (.src_clk(rx_clk), .src_rst_n(rst_rx_n), .src_ev(ephase_rx),
                               .dst_clk(clk), .dst_rst_n(rst_core_n), .dst_ev(ephase_core));
  gray_event_sync u_es_frame  (.src_clk(rx_clk), .src_rst_n(rst_rx_n), .src_ev(eframe_rx),
                               .dst_clk(clk), .dst_rst_n(rst_core_n), .dst_ev(eframe_core));
  gray_event_sync u_es_bferr  (.src_clk(rx_clk), .src_rst_n(rst_rx_n), .src_ev(ebf_rx),
                               .dst_clk(clk), .dst_rst_n(rst_core_n), .dst_ev(ebf_core));
  sync_2ff u_sync_en (.clk(rx_clk), .rst_n(rst_rx_n), .d(rx_enable_core), .q(rx_enable_rx));

  logic [1:0] credits_unused;

  arctic_nic_core #(.NTX_DEPTH(NTX_DEPTH), .SQ_DEPTH(SQ_DEPTH)) u_core (
    .clk(clk), .rst_n(rst_core_n),
    .hptf_data, .hptf_empty, .hptf_rd, .lptf_data, .lptf_empty, .lptf_rd,
    .hprf_wr, .hprf_wdata, .hprf_commit, .hprf_abort, .hprf_full, .hprf_free,
    .lprf_wr, .lprf_wdata, .lprf_commit, .lprf_abort, .lprf_full,
    .ntx_wr, .ntx_wdata, .ntx_commit, .ntx_full, .ntx_free,
    .nrx_data(nrx_rdata), .nrx_empty, .nrx_rd,
    .bf_rcvd(bf_rcvd_core), .ev_phase(ephase_core), .ev_frame(eframe_core), .ev_bf(ebf_core),
    .bf_send(bf_send_core), .rx_enable(rx_enable_core), .err_reg, .credits(credits_unused), .irq);

  arctic_link_tx u_ltx (
    .clk(clk_tx), .rst_n(rst_tx_n),
    .fifo_data(ntx_rdata), .fifo_empty(ntx_empty), .fifo_rd(ntx_rd),
    .bf_send(bf_send_tx),
    .cable_data(tx_data), .cable_phase(tx_phase), .cable_frame(tx_frame), .cable_bf(tx_bf));

  arctic_link_rx u_lrx (
    .clk(rx_clk), .rst_n(rst_rx_n), .enable(rx_enable_rx),
    .cable_data(rx_data), .cable_phase(rx_phase), .cable_frame(rx_frame), .cable_bf(rx_bf),
    .fifo_wr(nrx_wr), .fifo_wdata(nrx_wdata), .fifo_commit(nrx_commit), .fifo_abort(nrx_abort),
    .fifo_full(nrx_full),
    .bf_rcvd(bf_rcvd_rx), .err_phase(ephase_rx), .err_frame(eframe_rx), .err_bf(ebf_rx),
    .overflow(rx_ovf));

  // The router never sends more than three packets without credit, so the receive
  // FIFO cannot overflow.
  a_no_rx_overflow: assert property (@(posedge rx_clk) disable iff (!rst_rx_n) !rx_ovf)
    else $error("NIC receive FIFO overflow");
endmodule
