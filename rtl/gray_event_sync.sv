// gray_event_sync: carries single-cycle events from clock domain src_clk to dst_clk.
// The source counts events in a gray-coded counter; the destination synchronizes the
// counter with two flip-flops and emits one dst_ev pulse per cycle until its own count
// has caught up. Up to 2**W-1 events may be outstanding; a burst faster than that
// would be lost, which the adapter never produces (at most one event per packet or
// per pair of cable clocks, drained at one per destination clock).
module gray_event_sync #(
  parameter int unsigned W = 4
) (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_ev,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_ev
);
  logic [W-1:0] src_bin, src_gray;
  logic [W-1:0] meta, dst_gray, dst_bin_seen, dst_cnt;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      src_bin  <= '0;
      src_gray <= '0;
    end else if (src_ev) begin
      src_bin  <= src_bin + 1'b1;
      src_gray <= (src_bin + 1'b1) ^ ((src_bin + 1'b1) >> 1);
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      meta     <= '0;
      dst_gray <= '0;
    end else begin
      meta     <= src_gray;
      dst_gray <= meta;
    end
  end

  always_comb begin
    dst_bin_seen[W-1] = dst_gray[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) dst_bin_seen[i] = dst_bin_seen[i+1] ^ dst_gray[i];
  end

  assign dst_ev = (dst_cnt != dst_bin_seen);

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) dst_cnt <= '0;
    else if (dst_ev) dst_cnt <= dst_cnt + 1'b1;
  end
endmodule
