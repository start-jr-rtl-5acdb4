// pkt_fifo: dual-clock FIFO that hands whole packets to its reader.
//
// Models one of the adapter's message FIFOs (the four Squall-module FIFOs HPTF, LPTF,
// HPRF, LPRF, and the two FIFOs on the Arctic NIC) together with the small amount of
// FPGA logic that gives them packet semantics: a packet's words are written one by
// one, but the reader's empty flag only changes when the last word of a packet is
// committed. A partly written packet can be dropped with wr_abort, which is how a
// packet that fails its CRC never appears in a receive FIFO.
//
// Write side (wclk): wr_en writes wr_data if not full; wr_commit (with or without a
//   write in the same cycle) makes everything written so far, including that word,
//   visible to the reader; wr_abort throws away the uncommitted words. wr_free is
//   the number of free entries as the writer sees them (it may under-report for a
//   few cycles after a read).
// Read side (rclk): rd_data shows the oldest committed word (first-word-fall-through);
//   rd_en pops it. rd_empty means no committed word; it clears two or three read
//   clocks after the commit.
// Pointers are binary inside each domain and cross as gray code through two
// flip-flops. The document gives the part (a 36-bit synchronous FIFO, 512 deep for
// that part number) and the per-packet flag behaviour; the commit/abort mechanism
// and the exact flag timing are this design's own.
module pkt_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 512
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_commit,
  input  logic             wr_abort,
  output logic             wr_full,
  output logic [$clog2(DEPTH):0] wr_free,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction
  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  // ---------------------------------------------------------------- write domain
  ptr_t wptr, cptr, cptr_gray;           // speculative and committed write pointers
  ptr_t rptr, rptr_gray;                 // read pointer (read domain)
  ptr_t rgray_meta, rgray_w, rptr_w;
  logic do_wr;

  assign rptr_w  = gray2bin(rgray_w);
  assign wr_free = ptr_t'(DEPTH) - (wptr - rptr_w);
  assign wr_full = (wptr - rptr_w) == ptr_t'(DEPTH);
  assign do_wr   = wr_en && !wr_full && !wr_abort;

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr       <= '0;
      cptr       <= '0;
      cptr_gray  <= '0;
      rgray_meta <= '0;
      rgray_w    <= '0;
    end else begin
      rgray_meta <= rptr_gray;
      rgray_w    <= rgray_meta;
      if (wr_abort) begin
        wptr <= cptr;
      end else begin
        if (do_wr) wptr <= wptr + 1'b1;
        if (wr_commit) begin
          cptr      <= wptr + ptr_t'(do_wr);
          cptr_gray <= bin2gray(wptr + ptr_t'(do_wr));
        end
      end
    end
  end

  // ---------------------------------------------------------------- read domain
  ptr_t cgray_meta, cgray_r, cptr_r;

  assign cptr_r   = gray2bin(cgray_r);
  assign rd_empty = (rptr == cptr_r);
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr       <= '0;
      rptr_gray  <= '0;
      cgray_meta <= '0;
      cgray_r    <= '0;
    end else begin
      cgray_meta <= cptr_gray;
      cgray_r    <= cgray_meta;
      if (rd_en && !rd_empty) begin
        rptr      <= rptr + 1'b1;
        rptr_gray <= bin2gray(rptr + 1'b1);
      end
    end
  end

  // A committed packet must never be overwritten: the writer never runs more than
  // DEPTH words ahead of the reader.
  a_no_overrun: assert property (@(posedge wclk) disable iff (!wrst_n)
    (wptr - rptr_w) <= ptr_t'(DEPTH)) else $error("pkt_fifo overrun");
endmodule
