// sync_2ff: two-flip-flop synchronizer for one level signal entering the clock
// domain of clk. Output follows the input two clock edges later; reset value is
// RESET_VAL. Used only for slowly changing levels (enables); events cross with
// gray_event_sync.
module sync_2ff #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
