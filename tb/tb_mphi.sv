// tb_mphi: message passing hardware interface seen from both sides.
// SP side on a 30 ns local-bus clock, NIC side on a 50 ns (20 MHz) clock.
// Checks the control register after reset, the NIC reset bit, that the NIC sees a
// transmit packet only once its last word was written to the last-word address (and
// with the last flag on that word), that the SP's receive-empty flag clears only when
// a whole packet is committed and sets again after its last word is read, that an
// aborted receive packet never appears, the transmit "full" flag (no room for a
// maximum packet), and the FIFO reset bit.
module tb_mphi;
  logic sp_clk = 0, nic_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous resets act at once
  always #15 sp_clk = ~sp_clk;
  always #25 nic_clk = ~nic_clk;

  logic sp_sel = 0, sp_we = 0; logic [2:0] sp_addr = '0; logic [31:0] sp_wdata = '0, sp_rdata;
  logic nic_reset;
  logic [32:0] hptf_data, lptf_data; logic hptf_empty, lptf_empty;
  logic hptf_rd = 0, lptf_rd = 0;
  logic hprf_wr = 0, hprf_commit = 0, hprf_abort = 0, hprf_full;
  logic lprf_wr = 0, lprf_commit = 0, lprf_abort = 0, lprf_full;
  logic [32:0] hprf_wdata = '0, lprf_wdata = '0;
  logic [9:0] hprf_free;
  int checks = 0, failures = 0;

  mphi dut (.*);

  initial begin
    repeat (40000) @(posedge sp_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic spw(input logic [2:0] a, input logic [31:0] d);
    @(negedge sp_clk); sp_sel = 1; sp_we = 1; sp_addr = a; sp_wdata = d;
    @(negedge sp_clk); sp_sel = 0; sp_we = 0;
  endtask
  task automatic spr(input logic [2:0] a, output logic [31:0] d);
    @(negedge sp_clk); sp_sel = 1; sp_we = 0; sp_addr = a;
    @(negedge sp_clk); sp_sel = 0; d = sp_rdata;
  endtask
  task automatic nic_wait(input int n); repeat (n) @(negedge nic_clk); endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge sp_clk); rst_n = 1;
    repeat (4) @(negedge nic_clk);
    spr(3'd6, v);
    chk(v[8] == 1 && v[3] == 1 && v[2] == 1 && v[1:0] == 0, $sformatf("status after reset %h", v));
    chk(nic_reset == 1, "NIC held in reset after power-up");
    spw(3'd6, 32'h0);
    chk(nic_reset == 0, "NIC reset cleared by SP");

    // transmit packet into HPTF: two words, then the last word
    spw(3'd0, 32'h4000_0003);
    spw(3'd0, 32'h1111_1111);
    nic_wait(5);
    chk(hptf_empty, "partial packet invisible to NIC");
    spw(3'd1, 32'h2222_2222);
    nic_wait(4);
    chk(!hptf_empty, "packet visible after last-word write");
    chk(hptf_data == {1'b0, 32'h4000_0003}, "HPTF word 0");
    @(negedge nic_clk); hptf_rd = 1; @(negedge nic_clk); hptf_rd = 0;
    chk(hptf_data == {1'b0, 32'h1111_1111}, "HPTF word 1");
    @(negedge nic_clk); hptf_rd = 1; @(negedge nic_clk); hptf_rd = 0;
    chk(hptf_data == {1'b1, 32'h2222_2222}, "HPTF word 2 carries last flag");
    @(negedge nic_clk); hptf_rd = 1; @(negedge nic_clk); hptf_rd = 0;
    chk(hptf_empty, "HPTF empty after packet");

    // single-word packet through LPTF
    spw(3'd3, 32'hABCD_0001);
    nic_wait(4);
    chk(!lptf_empty && lptf_data == {1'b1, 32'hABCD_0001}, "LPTF one-word packet");
    @(negedge nic_clk); lptf_rd = 1; @(negedge nic_clk); lptf_rd = 0;

    // receive into HPRF: four words, commit on the last
    for (int i = 0; i < 4; i++) begin
      @(negedge nic_clk); hprf_wr = 1; hprf_wdata = {1'(i == 3), 32'hC000_0000 + 32'(i)}; hprf_commit = (i == 3);
      @(negedge nic_clk); hprf_wr = 0; hprf_commit = 0;
      if (i == 2) begin
        repeat (4) @(negedge sp_clk);
        spr(3'd6, v); chk(v[3] == 1, "HPRF still empty before commit");
      end
    end
    repeat (4) @(negedge sp_clk);
    spr(3'd6, v); chk(v[3] == 0, "HPRF not empty after commit");
    for (int i = 0; i < 4; i++) begin
      spr(3'd4, v); chk(v == 32'hC000_0000 + 32'(i), $sformatf("HPRF word %0d = %h", i, v));
      if (i < 3) begin spr(3'd6, v); chk(v[3] == 0 && v[10] == 0, "empty flag stays clear inside packet"); end
    end
    spr(3'd6, v); chk(v[3] == 1 && v[10] == 1, $sformatf("HPRF empty after last word read, last flag %h", v));

    // LPRF: an aborted packet followed by a good one
    for (int i = 0; i < 2; i++) begin
      @(negedge nic_clk); lprf_wr = 1; lprf_wdata = {1'b0, 32'hBAD0_0000 + 32'(i)};
      @(negedge nic_clk); lprf_wr = 0;
    end
    @(negedge nic_clk); lprf_abort = 1; @(negedge nic_clk); lprf_abort = 0;
    @(negedge nic_clk); lprf_wr = 1; lprf_wdata = {1'b0, 32'h600D_0000};
    @(negedge nic_clk); lprf_wdata = {1'b1, 32'h600D_0001}; lprf_commit = 1;
    @(negedge nic_clk); lprf_wr = 0; lprf_commit = 0;
    repeat (4) @(negedge sp_clk);
    spr(3'd6, v); chk(v[2] == 0, "LPRF holds the good packet");
    spr(3'd5, v); chk(v == 32'h600D_0000, $sformatf("aborted words skipped: %h", v));
    spr(3'd5, v); chk(v == 32'h600D_0001, "second word of good packet");
    spr(3'd6, v); chk(v[2] == 1, "LPRF empty afterwards");

    // transmit full flag: fill LPTF until it cannot take a maximum packet
    for (int i = 0; i < 512 - 24; i++) spw(3'd2, 32'(i));
    repeat (4) @(negedge sp_clk);
    spr(3'd6, v); chk(v[0] == 0, "LPTF still has room for one more packet");
    spw(3'd3, 32'hFFFF_FFFF);
    repeat (4) @(negedge sp_clk);
    spr(3'd6, v); chk(v[0] == 1 && v[1] == 0, $sformatf("LPTF full flag %h", v));
    nic_wait(4);
    chk(!lptf_empty && lptf_data == {1'b0, 32'h0}, "NIC sees the big LPTF packet");

    // FIFO reset clears everything
    spw(3'd6, 32'h200);
    spw(3'd6, 32'h000);
    nic_wait(6);
    spr(3'd6, v); chk(v[1:0] == 0 && v[3:2] == 2'b11, $sformatf("status after FIFO reset %h", v));
    chk(lptf_empty && hptf_empty, "transmit FIFOs empty after FIFO reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
