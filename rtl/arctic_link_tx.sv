// arctic_link_tx: transmit half of the Arctic cable interface.
//
// Runs on the NIC's 80 MHz transmit clock, which also goes down the cable with the
// data. Every pair of 80 MHz cycles carries one 32-bit word as two 16-bit halves
// (upper half first) plus one bit of each control signal:
//   PHASE        low in the first cycle of a pair, high in the second;
//   FRAME        Manchester coded: value in the first cycle, complement in the second.
//                It is true while a packet is on the wire and false on the packet's last
//                pair and while idle;
//   BUFFER_FREE  Manchester coded the same way; one true bit per buffer this NIC frees.
// The word for the next pair is taken from the NIC transmit FIFO once per pair (the
// 40 MHz rate is a clock enable here rather than a second clock). When the FIFO is
// empty the last word is repeated; since the core puts an idle word after every
// packet, the cable then carries the idle pattern. The word register is deliberately
// not reset: as on the real card, the cable carries whatever the FIFO held at power-up
// until the first packet has been sent.
// FIFO entry format: {frame, end_of_burst, data[31:0]}; end_of_burst is used by the
// core only and ignored here. Output signals are registered (the cable driving
// register). Manchester polarity and half order are this design's choices.
module arctic_link_tx (
  input  logic        clk,          // 80 MHz
  input  logic        rst_n,
  // NIC transmit FIFO read side
  input  logic [33:0] fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // one pulse per BUFFER_FREE to send (already in this clock domain)
  input  logic        bf_send,
  // cable
  output logic [15:0] cable_data,
  output logic        cable_phase,
  output logic        cable_frame,
  output logic        cable_bf
);
  logic        second;        // 1 while the cycle being prepared is the second of a pair
  logic [31:0] word_q;        // word of the current pair
  logic        frame_q;
  logic        bf_q;
  logic [3:0]  bf_pending;

  // The next pair's word is loaded in the cycle that prepares the second half.
  assign fifo_rd = second && !fifo_empty;

  always_ff @(posedge clk) begin
    if (fifo_rd) begin
      word_q  <= fifo_data[31:0];
      frame_q <= fifo_data[33];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second      <= 1'b0;
      bf_q        <= 1'b0;
      bf_pending  <= '0;
      cable_data  <= '0;
      cable_phase <= 1'b1;
      cable_frame <= 1'b0;
      cable_bf    <= 1'b1;
    end else begin
      second <= !second;
      if (!second) begin
        // first half of the pair held in word_q
        cable_data  <= word_q[31:16];
        cable_phase <= 1'b0;
        cable_frame <= frame_q;
        cable_bf    <= bf_q;
      end else begin
        cable_data  <= word_q[15:0];
        cable_phase <= 1'b1;
        cable_frame <= !frame_q;
        cable_bf    <= !bf_q;
      end
      // BUFFER_FREE bit for the next pair
      if (second) begin
        bf_q       <= (bf_pending != 0) || bf_send;
        bf_pending <= bf_pending + 4'(bf_send) - 4'((bf_pending != 0) || bf_send);
      end else begin
        bf_pending <= bf_pending + 4'(bf_send);
      end
    end
  end
endmodule
