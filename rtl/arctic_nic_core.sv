// arctic_nic_core: 20 MHz control section of the Arctic network interface card.
//
// Transmit engine. Takes packets from the Squall module's high and low priority
// transmit FIFOs (HPTF, LPTF; entries {last, data}) and copies them into the NIC
// transmit FIFO with FRAME set, followed by the CCITT-16 CRC word (FRAME clear) and
// one idle word, which is committed so the link side sends the whole packet back to
// back. A packet may start only when the Arctic router on the other end of the cable
// has a free buffer: the core counts the router's free buffers (three after the
// receive-enable command), spends one per packet and gets one back per BUFFER_FREE
// received. The last free buffer is reserved for high priority packets, so a low
// priority packet needs two. High priority goes first when both are waiting.
// A first word with bit 31 set in HPTF is a register request instead of a packet:
//   REG_RX_ENABLE (header + argument word): writes {response id, error register} to
//     HPRF, clears the error register, sets the receive enable to argument bit 0 and
//     reloads the buffer count;
//   REG_READ_ERR (header only): writes {response id, error register} to HPRF.
// Receive engine. Takes whole packets from the NIC receive FIFO, steers each by the
// priority bit (30) of its first word to HPRF or LPRF, recomputing the CRC on the way.
// At the CRC word the packet is committed in the Squall FIFO and one BUFFER_FREE is
// sent to the router, or, if the CRC is wrong, the words are discarded, the CRC error
// bit is set and reception is disabled. A full HPRF/LPRF stalls the engine, so no
// BUFFER_FREE is sent until the SP makes room, which in turn stops the router.
// Errors: the error register holds CRC, BUFFER_FREE, PHASE and FRAME error bits; a
// PHASE or FRAME error also drops the receive enable. irq is high while any bit is set.
// What follows the document: buffer counting with the high priority reserve, CRC
// generation and checking, withholding BUFFER_FREE, the two-word enable command that
// returns and clears the four-bit error register, idle insertion. This design's own:
// header bit positions, opcodes, the response format, HP-first arbitration, reloading
// the buffer count on enable, and starting a packet only with room for a maximum one.
module arctic_nic_core
  import startjr_pkg::*;
#(
  parameter int unsigned NTX_DEPTH = 64,
  parameter int unsigned SQ_DEPTH  = 512
) (
  input  logic        clk,
  input  logic        rst_n,
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
  // NIC transmit FIFO, write side: {frame, end_of_burst, data}
  output logic        ntx_wr,
  output logic [33:0] ntx_wdata,
  output logic        ntx_commit,
  input  logic        ntx_full,
  input  logic [$clog2(NTX_DEPTH):0] ntx_free,
  // NIC receive FIFO, read side: {last, data}
  input  logic [32:0] nrx_data,
  input  logic        nrx_empty,
  output logic        nrx_rd,
  // link events, already in this clock domain
  input  logic        bf_rcvd,
  input  logic        ev_phase,
  input  logic        ev_frame,
  input  logic        ev_bf,
  output logic        bf_send,
  output logic        rx_enable,
  output nic_err_t    err_reg,
  output logic [1:0]  credits,
  output logic        irq
);
  // ---------------------------------------------------------------- transmit engine
  typedef enum logic [2:0] {TX_IDLE, TX_SEND, TX_CRC, TX_IDLEW, TX_REG, TX_RESP_ID, TX_RESP_DATA} tx_state_e;
  typedef enum logic [1:0] {RX_IDLE, RX_MOVE} rx_state_e;
  tx_state_e tx_state;
  rx_state_e rx_state;

  logic        src_lp;
  logic [32:0] src_data;
  logic        src_empty;
  logic [15:0] tx_crc, tx_crc_next, rx_crc, rx_crc_next;
  reg_op_e     reg_op;
  logic [31:0] reg_arg;
  logic        reg_first;
  logic        take_credit, start_hp, start_lp, start_reg;
  logic        resp_done;
  logic        crc_fail;

  assign src_data  = src_lp ? lptf_data  : hptf_data;
  assign src_empty = src_lp ? lptf_empty : hptf_empty;

  crc16_ccitt32 u_tx_crc (.crc_in(tx_crc), .data(src_data[31:0]), .crc_out(tx_crc_next));
  crc16_ccitt32 u_rx_crc (.crc_in(rx_crc), .data(nrx_data[31:0]), .crc_out(rx_crc_next));

  localparam int unsigned ROOM = MAX_PKT_WORDS + 2;   // packet + CRC word + idle word

  always_comb begin
    start_reg = 1'b0;
    start_hp  = 1'b0;
    start_lp  = 1'b0;
    if (tx_state == TX_IDLE) begin
      if (!hptf_empty && hptf_data[HDR_REGREQ_BIT])
        start_reg = 1'b1;
      else if (!hptf_empty && credits >= 2'd1 && ntx_free >= ($clog2(NTX_DEPTH)+1)'(ROOM))
        start_hp = 1'b1;
      else if (!lptf_empty && credits >= 2'd2 && ntx_free >= ($clog2(NTX_DEPTH)+1)'(ROOM))
        start_lp = 1'b1;
    end
  end
  assign take_credit = start_hp || start_lp;

  always_comb begin
    hptf_rd    = 1'b0;
    lptf_rd    = 1'b0;
    ntx_wr     = 1'b0;
    ntx_wdata  = {1'b1, 1'b0, src_data[31:0]};
    ntx_commit = 1'b0;
    unique case (tx_state)
      TX_SEND: if (!ntx_full && !src_empty) begin
        ntx_wr = 1'b1;
        if (src_lp) lptf_rd = 1'b1; else hptf_rd = 1'b1;
      end
      TX_CRC: begin
        ntx_wr    = !ntx_full;
        ntx_wdata = {1'b0, 1'b0, 16'h0000, tx_crc};
      end
      TX_IDLEW: begin
        ntx_wr     = !ntx_full;
        ntx_wdata  = {1'b0, 1'b1, IDLE_WORD};
        ntx_commit = !ntx_full;
      end
      TX_REG: hptf_rd = !hptf_empty;
      default: ;
    endcase
  end

  // Register responses and received high priority packets share HPRF; a response is
  // written only while the receive engine is between packets, and the receive engine
  // does not start a packet while a response is pending.
  logic resp_go;
  assign resp_go = (rx_state == RX_IDLE) && hprf_free >= ($clog2(SQ_DEPTH)+1)'(2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state  <= TX_IDLE;
      src_lp    <= 1'b0;
      tx_crc    <= 16'hFFFF;
      reg_op    <= REG_READ_ERR;
      reg_arg   <= '0;
      reg_first <= 1'b0;
    end else begin
      unique case (tx_state)
        TX_IDLE: begin
          tx_crc <= 16'hFFFF;
          if (start_reg) begin
            src_lp    <= 1'b0;
            reg_op    <= reg_op_e'(hptf_data[3:0]);
            reg_arg   <= '0;
            reg_first <= 1'b1;
            tx_state  <= TX_REG;
          end else if (start_hp) begin
            src_lp   <= 1'b0;
            tx_state <= TX_SEND;
          end else if (start_lp) begin
            src_lp   <= 1'b1;
            tx_state <= TX_SEND;
          end
        end
        TX_SEND: if (!ntx_full && !src_empty) begin
          tx_crc <= tx_crc_next;
          if (src_data[32]) tx_state <= TX_CRC;
        end
        TX_CRC:   if (!ntx_full) tx_state <= TX_IDLEW;
        TX_IDLEW: if (!ntx_full) tx_state <= TX_IDLE;
        TX_REG: if (!hptf_empty) begin
          reg_first <= 1'b0;
          if (!reg_first) reg_arg <= hptf_data[31:0];
          if (hptf_data[32]) tx_state <= TX_RESP_ID;
        end
        TX_RESP_ID:   if (resp_go) tx_state <= TX_RESP_DATA;
        TX_RESP_DATA: tx_state <= TX_IDLE;
        default: tx_state <= TX_IDLE;
      endcase
    end
  end
  assign resp_done = (tx_state == TX_RESP_DATA);

  // ---------------------------------------------------------------- receive engine
  logic        rx_lp;
  logic        rx_start;
  logic        tgt_full;
  assign tgt_full = rx_lp ? lprf_full : hprf_full;
  assign rx_start = (rx_state == RX_IDLE) && !nrx_empty &&
                    tx_state != TX_RESP_ID && tx_state != TX_RESP_DATA;
  assign crc_fail = (rx_state == RX_MOVE) && !nrx_empty && nrx_data[32] &&
                    (nrx_data[31:0] != {16'h0000, rx_crc});

  always_comb begin
    nrx_rd      = 1'b0;
    hprf_wr     = 1'b0;
    hprf_wdata  = {1'b0, nrx_data[31:0]};
    hprf_commit = 1'b0;
    hprf_abort  = 1'b0;
    lprf_wr     = 1'b0;
    lprf_wdata  = {1'b0, nrx_data[31:0]};
    lprf_commit = 1'b0;
    lprf_abort  = 1'b0;
    bf_send     = 1'b0;
    if (rx_state == RX_MOVE && !nrx_empty) begin
      if (nrx_data[32]) begin
        nrx_rd  = 1'b1;
        bf_send = !crc_fail;
        if (rx_lp) begin lprf_commit = !crc_fail; lprf_abort = crc_fail; end
        else       begin hprf_commit = !crc_fail; hprf_abort = crc_fail; end
      end else if (!tgt_full) begin
        nrx_rd = 1'b1;
        if (rx_lp) lprf_wr = 1'b1; else hprf_wr = 1'b1;
      end
    end
    // register response words (HPRF is free of packets here, see resp_go)
    if (tx_state == TX_RESP_ID && resp_go) begin
      hprf_wr    = 1'b1;
      hprf_wdata = {1'b0, resp_id(reg_op)};
    end else if (resp_done) begin
      hprf_wr     = 1'b1;
      hprf_wdata  = {1'b1, 28'd0, err_reg};
      hprf_commit = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state <= RX_IDLE;
      rx_lp    <= 1'b0;
      rx_crc   <= 16'hFFFF;
    end else begin
      unique case (rx_state)
        RX_IDLE: if (rx_start) begin
          rx_lp    <= !nrx_data[HDR_PRIO_BIT];
          rx_crc   <= 16'hFFFF;
          rx_state <= RX_MOVE;
        end
        RX_MOVE: if (!nrx_empty) begin
          if (nrx_data[32]) rx_state <= RX_IDLE;
          else if (!tgt_full) rx_crc <= rx_crc_next;
        end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- error register, enable, credits
  nic_err_t new_err;
  assign new_err = '{crc: crc_fail, bf: ev_bf, phase: ev_phase, frame: ev_frame};
  logic clear_err;
  assign clear_err = resp_done && reg_op == REG_RX_ENABLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_reg   <= '0;
      rx_enable <= 1'b0;
      credits   <= 2'(ARCTIC_BUFFERS);
    end else begin
      err_reg <= (clear_err ? nic_err_t'(4'b0) : err_reg) | new_err;
      if (clear_err)                              rx_enable <= reg_arg[0];
      else if (crc_fail || ev_phase || ev_frame) rx_enable <= 1'b0;
      if (clear_err) credits <= 2'(ARCTIC_BUFFERS);
      else           credits <= credits - 2'(take_credit) +
                                2'(bf_rcvd && (credits - 2'(take_credit)) != 2'(ARCTIC_BUFFERS));
    end
  end

  assign irq = |err_reg;

  // The receive engine only sees whole packets, and a packet never outgrows the
  // router's buffers.
  a_whole_packet: assert property (@(posedge clk) disable iff (!rst_n)
    (rx_state == RX_IDLE && !nrx_empty) |-> !nrx_data[32])
    else $error("packet without body in NIC receive FIFO");
endmodule
