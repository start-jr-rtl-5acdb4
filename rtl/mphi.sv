// mphi: Message Passing Hardware Interface on the Squall module.
//
// Gives the service processor (SP) a plain 32-bit FIFO interface to the network card,
// whichever card is fitted. Four packet FIFOs (pkt_fifo, 512 words each):
//   HPTF, LPTF  high / low priority transmit: SP writes, NIC reads;
//   HPRF, LPRF  high / low priority receive: NIC writes, SP reads.
// Each entry is {last, data[31:0]}. The SP marks the last word of a packet or register
// request by writing it to the FIFO's second ("last word") address; that write also
// commits the packet, so the NIC sees only whole packets.
// SP register map (sp_addr, word addresses inside the MPHI window):
//   0 HPTF data write        1 HPTF last-word write
//   2 LPTF data write        3 LPTF last-word write
//   4 HPRF read (pops)       5 LPRF read (pops); rdata = data word
//   6 control / status: read  {21'0, last-word flag of the last FIFO read, fifo_reset,
//                              nic_reset, 4'0, hprf_empty, lprf_empty, hptf_full, lptf_full}
//                       write bit 9 = fifo_reset, bit 8 = nic_reset
// A transmit "full" flag means the FIFO cannot take another maximum (24 word) packet;
// a receive "empty" flag changes only when a whole packet has arrived or its last word
// has been read. nic_reset (set at power-up) holds the network card in reset; fifo_reset
// empties all four FIFOs, which the SP uses after an error. Read data are registered:
// sp_rdata is valid the cycle after sp_sel with !sp_we.
// Burst (four-word) SP accesses are a sequence of single accesses here. Addresses, flag
// bit positions, the full threshold and the fifo_reset bit are this design's choices.
module mphi
  import startjr_pkg::*;
#(
  parameter int unsigned SQ_DEPTH = 512
) (
  input  logic        sp_clk,
  input  logic        rst_n,
  input  logic        sp_sel,
  input  logic        sp_we,
  input  logic [2:0]  sp_addr,
  input  logic [31:0] sp_wdata,
  output logic [31:0] sp_rdata,
  output logic        nic_reset,
  // NIC side (clock nic_clk)
  input  logic        nic_clk,
  output logic [32:0] hptf_data,
  output logic        hptf_empty,
  input  logic        hptf_rd,
  output logic [32:0] lptf_data,
  output logic        lptf_empty,
  input  logic        lptf_rd,
  input  logic        hprf_wr,
  input  logic [32:0] hprf_wdata,
  input  logic        hprf_commit,
  input  logic        hprf_abort,
  output logic        hprf_full,
  output logic [$clog2(SQ_DEPTH):0] hprf_free,
  input  logic        lprf_wr,
  input  logic [32:0] lprf_wdata,
  input  logic        lprf_commit,
  input  logic        lprf_abort,
  output logic        lprf_full
);
  localparam int unsigned FW = $clog2(SQ_DEPTH) + 1;

  logic fifo_reset;
  logic sp_fifo_rst_n, nic_fifo_rst_n, fifo_arst_n;
  assign fifo_arst_n = rst_n && !fifo_reset;
  rst_sync u_rs_sp  (.clk(sp_clk),  .arst_n(fifo_arst_n), .rst_n(sp_fifo_rst_n));
  rst_sync u_rs_nic (.clk(nic_clk), .arst_n(fifo_arst_n), .rst_n(nic_fifo_rst_n));

  logic wr_hp, wr_lp, rd_hp, rd_lp, wr_last;
  assign wr_hp   = sp_sel && sp_we && (sp_addr[2:1] == 2'd0);
  assign wr_lp   = sp_sel && sp_we && (sp_addr[2:1] == 2'd1);
  assign wr_last = sp_addr[0];
  assign rd_hp   = sp_sel && !sp_we && (sp_addr == 3'd4);
  assign rd_lp   = sp_sel && !sp_we && (sp_addr == 3'd5);

  logic [FW-1:0] hptf_free, lptf_free, lprf_free_unused;
  logic hptf_full_w, lptf_full_w;
  logic [32:0] hprf_rdata, lprf_rdata;
  logic hprf_empty, lprf_empty;

  pkt_fifo #(.WIDTH(33), .DEPTH(SQ_DEPTH)) u_hptf (
    .wclk(sp_clk), .wrst_n(sp_fifo_rst_n), .wr_en(wr_hp), .wr_data({wr_last, sp_wdata}),
    .wr_commit(wr_hp && wr_last), .wr_abort(1'b0), .wr_full(hptf_full_w), .wr_free(hptf_free),
    .rclk(nic_clk), .rrst_n(nic_fifo_rst_n), .rd_en(hptf_rd), .rd_data(hptf_data), .rd_empty(hptf_empty));
  pkt_fifo #(.WIDTH(33), .DEPTH(SQ_DEPTH)) u_lptf (
    .wclk(sp_clk), .wrst_n(sp_fifo_rst_n), .wr_en(wr_lp), .wr_data({wr_last, sp_wdata}),
    .wr_commit(wr_lp && wr_last), .wr_abort(1'b0), .wr_full(lptf_full_w), .wr_free(lptf_free),
    .rclk(nic_clk), .rrst_n(nic_fifo_rst_n), .rd_en(lptf_rd), .rd_data(lptf_data), .rd_empty(lptf_empty));
  pkt_fifo #(.WIDTH(33), .DEPTH(SQ_DEPTH)) u_hprf (
    .wclk(nic_clk), .wrst_n(nic_fifo_rst_n), .wr_en(hprf_wr), .wr_data(hprf_wdata),
    .wr_commit(hprf_commit), .wr_abort(hprf_abort), .wr_full(hprf_full), .wr_free(hprf_free),
    .rclk(sp_clk), .rrst_n(sp_fifo_rst_n), .rd_en(rd_hp), .rd_data(hprf_rdata), .rd_empty(hprf_empty));
  pkt_fifo #(.WIDTH(33), .DEPTH(SQ_DEPTH)) u_lprf (
    .wclk(nic_clk), .wrst_n(nic_fifo_rst_n), .wr_en(lprf_wr), .wr_data(lprf_wdata),
    .wr_commit(lprf_commit), .wr_abort(lprf_abort), .wr_full(lprf_full), .wr_free(lprf_free_unused),
    .rclk(sp_clk), .rrst_n(sp_fifo_rst_n), .rd_en(rd_lp), .rd_data(lprf_rdata), .rd_empty(lprf_empty));

  logic hptf_flag, lptf_flag;
  assign hptf_flag = hptf_free < FW'(MAX_PKT_WORDS);
  assign lptf_flag = lptf_free < FW'(MAX_PKT_WORDS);

  logic last_flag;
  always_ff @(posedge sp_clk or negedge rst_n) begin
    if (!rst_n) begin
      nic_reset  <= 1'b1;
      fifo_reset <= 1'b0;
      sp_rdata   <= '0;
      last_flag  <= 1'b0;
    end else begin
      if (sp_sel && sp_we && sp_addr == 3'd6) begin
        nic_reset  <= sp_wdata[8];
        fifo_reset <= sp_wdata[9];
      end
      if (sp_sel && !sp_we) begin
        unique case (sp_addr)
          3'd4: begin sp_rdata <= hprf_rdata[31:0]; last_flag <= hprf_rdata[32]; end
          3'd5: begin sp_rdata <= lprf_rdata[31:0]; last_flag <= lprf_rdata[32]; end
          3'd6: sp_rdata <= {21'd0, last_flag, fifo_reset, nic_reset, 4'd0,
                             hprf_empty, lprf_empty, hptf_flag, lptf_flag};
          default: sp_rdata <= '0;
        endcase
      end
    end
  end

  // The SP obeys the flags: no write to a full transmit FIFO.
  a_hptf_room: assert property (@(posedge sp_clk) disable iff (!sp_fifo_rst_n) !(wr_hp && hptf_full_w))
    else $error("write to full HPTF");
  a_lptf_room: assert property (@(posedge sp_clk) disable iff (!sp_fifo_rst_n) !(wr_lp && lptf_full_w))
    else $error("write to full LPTF");
endmodule
