// tb_dpsram: writes random words through both ports of the dual-ported SRAM, reads
// every written word back through the other port and the same port, and checks
// the one-cycle read latency and read-before-write behaviour against a shadow array.
module tb_dpsram;
  localparam int W = 4096;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [11:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] shadow [W];
  bit          written [W];
  int checks = 0, failures = 0;

  dpsram #(.WORDS(W)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 8) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    {a_en, a_we, b_en, b_we} = '0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    @(negedge clk);
    // fill: port A even addresses, port B odd addresses, same cycle
    for (int i = 0; i < W; i += 2) begin
      a_en = 1; a_we = 1; a_addr = 12'(i);   a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = 12'(i+1); b_wdata = $urandom;
      shadow[i] = a_wdata; shadow[i+1] = b_wdata;
      @(negedge clk);
    end
    // cross reads: port A reads what B wrote and vice versa
    for (int i = 0; i < W; i += 2) begin
      a_en = 1; a_we = 0; a_addr = 12'(i+1);
      b_en = 1; b_we = 0; b_addr = 12'(i);
      @(negedge clk);
      check("A read", a_rdata, shadow[i+1]);
      check("B read", b_rdata, shadow[i]);
    end
    // read-first on a write, and rdata held while the port is idle
    a_en = 1; a_we = 1; a_addr = 12'h123; a_wdata = 32'hDEADBEEF; b_en = 0;
    @(negedge clk);
    check("A read-before-write", a_rdata, shadow[12'h123]);
    a_en = 0; a_we = 0;
    @(negedge clk);
    check("A hold while idle", a_rdata, shadow[12'h123]);
    shadow[12'h123] = 32'hDEADBEEF;
    b_en = 1; b_addr = 12'h123;
    @(negedge clk);
    check("B sees A write", b_rdata, 32'hDEADBEEF);
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      logic [11:0] ra, rb;
      ra = 12'($urandom); rb = 12'($urandom);
      a_en = 1; a_we = 0; a_addr = ra;
      b_en = 1; b_we = (ra != rb) && $urandom_range(0, 1) == 1; b_addr = rb; b_wdata = $urandom;
      @(negedge clk);
      check("A random read", a_rdata, shadow[ra]);
      check("B random read", b_rdata, shadow[rb]);
      if (b_we) shadow[rb] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
