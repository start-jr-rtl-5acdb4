// dpsram: 16 KB dual-ported synchronous SRAM (4096 x 32) on the Squall module.
//
// Holds the level-one global shared memory cache (two 4 KB sets of two-word lines),
// the 4 KB of tag/control words read by the address capture device, and 4 KB of SP
// scratch space (layout in startjr_pkg). Port A belongs to the address capture device
// (and through it the PCI interface chip), port B to the service processor. Each
// port: en/we/addr/wdata sampled on the clock edge, rdata valid on the next edge
// (read-first on a same-port write). A write on both ports to one address in the same
// cycle leaves port B's data, an arbitrary choice; the software never does it. Both
// ports run on the local-bus clock.
module dpsram #(
  parameter int unsigned WORDS = 4096
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [31:0]              a_wdata,
  output logic [31:0]              a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  input  logic [31:0]              b_wdata,
  output logic [31:0]              b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
