// startjr_node: one StarT-jr network adapter - the Squall module and the Arctic NIC.
//
// A StarT-jr node is a stock PC whose PCI bus carries a commercial i960 card (the
// service processor, SP). The custom hardware modelled here hangs off that card's
// local bus:
//   mphi         four packet FIFOs between the SP and the network card, control register;
//   arctic_nic   the Arctic Switch Fabric network card (CRC, buffer credits, cable);
//   acd          address capture device serving host reads and writes of global shared
//                memory from the level-one cache, or interrupting the SP;
//   dpsram       16 KB dual-ported SRAM: level-one cache data, tag space, SP scratch.
// The SP, the PCI interface chip, the DRAM level-two cache and the Arctic router are
// outside; their connections are the ports below.
// SP local bus (clk_lb): sp_sel/sp_we/sp_addr (word address)/sp_wdata, sp_rdata valid
// one cycle after a read. Windows, chosen by sp_addr[15:12]:
//   0x0xxx  DPSRAM port B (sp_addr[11:0])
//   0x1xxx  MPHI registers (sp_addr[2:0], see mphi)
//   0x2xxx  ACD registers (sp_addr[1:0], see acd)
// GSM port (clk_lb): the PCI interface chip's view of the local bus, see acd.
// Arctic cable: transmit data, PHASE, FRAME and BUFFER_FREE with their 80 MHz clock
// (clk_tx), and the same set received with the cable's clock.
// Clocks: clk_lb local bus, clk_nic 20 MHz NIC core, clk_tx 80 MHz transmit, rx_clk
// from the cable. rst_n is the power-on reset; the NIC also stays in reset while the
// MPHI control register's NIC reset bit is set (it is after power-up).
module startjr_node
  import startjr_pkg::*;
(
  input  logic        clk_lb,
  input  logic        clk_nic,
  input  logic        clk_tx,
  input  logic        rst_n,
  // SP local bus
  input  logic        sp_sel,
  input  logic        sp_we,
  input  logic [15:0] sp_addr,
  input  logic [31:0] sp_wdata,
  output logic [31:0] sp_rdata,
  output logic        irq_acd,
  output logic        irq_nic,
  // GSM accesses from the PCI interface chip
  input  logic        gsm_req,
  input  logic        gsm_we,
  input  logic [31:0] gsm_addr,
  input  logic [31:0] gsm_wdata,
  output logic        gsm_ready,
  output logic [31:0] gsm_rdata,
  // Arctic cable
  output logic        tx_clk_out,
  output logic [15:0] tx_data,
  output logic        tx_phase,
  output logic        tx_frame,
  output logic        tx_bf,
  input  logic        rx_clk,
  input  logic [15:0] rx_data,
  input  logic        rx_phase,
  input  logic        rx_frame,
  input  logic        rx_bf
);
  localparam int unsigned SQ_DEPTH = 512;

  // ---------------------------------------------------------------- SP address decode
  logic sel_dp, sel_mphi, sel_acd;
  logic [1:0] rsel_q;
  assign sel_dp   = sp_sel && sp_addr[15:12] == 4'h0;
  assign sel_mphi = sp_sel && sp_addr[15:12] == 4'h1;
  assign sel_acd  = sp_sel && sp_addr[15:12] == 4'h2;

  always_ff @(posedge clk_lb or negedge rst_n) begin
    if (!rst_n) rsel_q <= 2'd0;
    else if (sp_sel && !sp_we) rsel_q <= sp_addr[13:12];
  end

  logic [31:0] dp_b_rdata, mphi_rdata, acd_rdata;
  always_comb begin
    unique case (rsel_q)
      2'd0:    sp_rdata = dp_b_rdata;
      2'd1:    sp_rdata = mphi_rdata;
      2'd2:    sp_rdata = acd_rdata;
      default: sp_rdata = '0;
    endcase
  end

  // ---------------------------------------------------------------- Squall module
  logic        nic_reset;
  logic [32:0] hptf_data, lptf_data, hprf_wdata, lprf_wdata;
  logic        hptf_empty, lptf_empty, hptf_rd, lptf_rd;
  logic        hprf_wr, hprf_commit, hprf_abort, hprf_full;
  logic        lprf_wr, lprf_commit, lprf_abort, lprf_full;
  logic [$clog2(SQ_DEPTH):0] hprf_free;

  mphi #(.SQ_DEPTH(SQ_DEPTH)) u_mphi (
    .sp_clk(clk_lb), .rst_n, .sp_sel(sel_mphi), .sp_we, .sp_addr(sp_addr[2:0]),
    .sp_wdata, .sp_rdata(mphi_rdata), .nic_reset,
    .nic_clk(clk_nic),
    .hptf_data, .hptf_empty, .hptf_rd, .lptf_data, .lptf_empty, .lptf_rd,
    .hprf_wr, .hprf_wdata, .hprf_commit, .hprf_abort, .hprf_full, .hprf_free,
    .lprf_wr, .lprf_wdata, .lprf_commit, .lprf_abort, .lprf_full);

  logic        dp_a_en, dp_a_we;
  logic [DP_AW-1:0] dp_a_addr;
  logic [31:0] dp_a_wdata, dp_a_rdata;

  dpsram #(.WORDS(DP_WORDS)) u_dpsram (
    .clk(clk_lb),
    .a_en(dp_a_en), .a_we(dp_a_we), .a_addr(dp_a_addr), .a_wdata(dp_a_wdata), .a_rdata(dp_a_rdata),
    .b_en(sel_dp), .b_we(sp_we), .b_addr(sp_addr[DP_AW-1:0]), .b_wdata(sp_wdata), .b_rdata(dp_b_rdata));

  acd u_acd (
    .clk(clk_lb), .rst_n,
    .gsm_req, .gsm_we, .gsm_addr, .gsm_wdata, .gsm_ready, .gsm_rdata,
    .dp_en(dp_a_en), .dp_we(dp_a_we), .dp_addr(dp_a_addr), .dp_wdata(dp_a_wdata), .dp_rdata(dp_a_rdata),
    .sp_sel(sel_acd), .sp_we, .sp_addr(sp_addr[1:0]), .sp_wdata, .sp_rdata(acd_rdata),
    .irq(irq_acd));

  // ---------------------------------------------------------------- Arctic NIC
  nic_err_t nic_err_unused;
  arctic_nic #(.SQ_DEPTH(SQ_DEPTH)) u_nic (
    .clk(clk_nic), .clk_tx, .arst_n(rst_n && !nic_reset),
    .hptf_data, .hptf_empty, .hptf_rd, .lptf_data, .lptf_empty, .lptf_rd,
    .hprf_wr, .hprf_wdata, .hprf_commit, .hprf_abort, .hprf_full, .hprf_free,
    .lprf_wr, .lprf_wdata, .lprf_commit, .lprf_abort, .lprf_full,
    .tx_clk_out, .tx_data, .tx_phase, .tx_frame, .tx_bf,
    .rx_clk, .rx_data, .rx_phase, .rx_frame, .rx_bf,
    .irq(irq_nic), .err_reg(nic_err_unused));
endmodule
