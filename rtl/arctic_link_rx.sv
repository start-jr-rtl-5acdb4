// arctic_link_rx: receive half of the Arctic cable interface.
//
// Runs on the 80 MHz clock received from the cable. Each cycle the 16-bit data, PHASE,
// FRAME and BUFFER_FREE are captured; a cycle with PHASE high completes a pair with
// the previous cycle (upper half first) and yields one 32-bit word and one bit each of
// FRAME and BUFFER_FREE, both Manchester coded (first half = value, second = its
// complement). Checks, active only while the receiver is enabled:
//   PHASE error        PHASE did not toggle between two cycles;
//   FRAME error        the two halves of a FRAME pair are equal;
//   BUFFER_FREE error  the two halves of a BUFFER_FREE pair are equal. The pair is
//                      taken as deasserted and reception goes on.
// A PHASE or FRAME error aborts any partly received packet and disables the receiver
// until `enable` has been dropped and raised again (the core does that with the
// receive-enable command). Each error and each valid BUFFER_FREE is reported as a one
// cycle pulse.
// Packets: the first pair with FRAME true starts a packet; every pair while FRAME is
// true is a packet word; the pair with FRAME false that follows is the packet's last
// word (its CRC word) and ends it. Words go to the NIC receive FIFO as {last, data}
// and the packet is committed with its last word, so the core only ever sees whole
// packets. The FIFO has room for the three packets the router may send without
// credit; a word that meets a full FIFO is dropped and reported on `overflow`.
module arctic_link_rx (
  input  logic        clk,          // cable clock
  input  logic        rst_n,
  input  logic        enable,       // synchronized receive enable from the core
  input  logic [15:0] cable_data,
  input  logic        cable_phase,
  input  logic        cable_frame,
  input  logic        cable_bf,
  // NIC receive FIFO write side
  output logic        fifo_wr,
  output logic [32:0] fifo_wdata,
  output logic        fifo_commit,
  output logic        fifo_abort,
  input  logic        fifo_full,
  // event pulses
  output logic        bf_rcvd,
  output logic        err_phase,
  output logic        err_frame,
  output logic        err_bf,
  output logic        overflow
);
  logic [15:0] d_q, d_p;
  logic        ph_q, ph_p, fr_q, fr_p, bf_q, bf_p;
  logic        q_valid, p_valid;     // capture / previous registers hold cable samples
  logic        dis;                  // disabled by a PHASE or FRAME error
  logic        in_pkt;
  logic        active;

  assign active = enable && !dis;

  // input capture and previous-sample registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {d_q, ph_q, fr_q, bf_q} <= '0;
      {d_p, ph_p, fr_p, bf_p} <= '0;
      q_valid <= 1'b0;
      p_valid <= 1'b0;
    end else begin
      d_q <= cable_data; ph_q <= cable_phase; fr_q <= cable_frame; bf_q <= cable_bf;
      d_p <= d_q;        ph_p <= ph_q;        fr_p <= fr_q;        bf_p <= bf_q;
      q_valid <= active;
      p_valid <= q_valid && active;
    end
  end

  logic pair, phase_bad, frame_bad, bf_bad;
  assign phase_bad = p_valid && (ph_q == ph_p);
  assign pair      = p_valid && ph_q && !ph_p;
  assign frame_bad = pair && !(fr_p ^ fr_q);
  assign bf_bad    = pair && !(bf_p ^ bf_q);

  always_comb begin
    fifo_wr     = 1'b0;
    fifo_wdata  = {1'b0, d_p, d_q};
    fifo_commit = 1'b0;
    fifo_abort  = 1'b0;
    if (active && (phase_bad || frame_bad)) begin
      fifo_abort = in_pkt;
    end else if (active && pair) begin
      if (fr_p) begin
        fifo_wr = 1'b1;
      end else if (in_pkt) begin
        fifo_wr     = 1'b1;
        fifo_wdata  = {1'b1, d_p, d_q};
        fifo_commit = 1'b1;
      end
    end
  end

  assign err_phase = active && phase_bad;
  assign err_frame = active && !phase_bad && frame_bad;
  assign err_bf    = active && !phase_bad && bf_bad;
  assign bf_rcvd   = active && pair && !phase_bad && !bf_bad && bf_p;
  assign overflow  = fifo_wr && fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dis    <= 1'b0;
      in_pkt <= 1'b0;
    end else if (!enable) begin
      dis    <= 1'b0;
      in_pkt <= 1'b0;
    end else if (!dis) begin
      if (phase_bad || frame_bad) begin
        dis    <= 1'b1;
        in_pkt <= 1'b0;
      end else if (pair) begin
        in_pkt <= fr_p;
      end
    end
  end
endmodule
