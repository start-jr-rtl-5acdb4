// rst_sync: reset synchronizer. The active-low reset output asserts at once with
// arst_n and deasserts two edges of clk after arst_n rises, so every clock domain of
// the adapter leaves reset cleanly on its own clock.
// Two flops clear asynchronously on arst_n and fill with ones on clk. The output is
// the second flop ANDed with arst_n itself, so reset is seen even while arst_n is
// low from power-up with no falling edge to clear the flops yet (for example a
// reset made from a register bit that powers up set).
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic meta, sync_q;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      meta   <= 1'b0;
      sync_q <= 1'b0;
    end else begin
      meta   <= 1'b1;
      sync_q <= meta;
    end
  end
  assign rst_n = sync_q && arst_n;
endmodule
