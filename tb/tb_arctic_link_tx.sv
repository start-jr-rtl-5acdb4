// tb_arctic_link_tx: Arctic cable transmitter.
// A queue stands in for the NIC transmit FIFO. The testbench decodes the cable on its
// own: PHASE must toggle every cycle, FRAME and BUFFER_FREE must be valid Manchester
// pairs, and each pair's two halves form one 32-bit word. Checked: the decoded word
// stream (consecutive repeats folded) equals the words fed in, each with its FRAME
// value; a burst of N words leaves the cable in N consecutive pairs (40 MHz word
// rate); the last word keeps repeating when the FIFO runs dry; every BUFFER_FREE
// request, including back-to-back ones, appears as exactly one true BUFFER_FREE pair.
module tb_arctic_link_tx;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous resets act at once
  always #6.25 clk = ~clk;   // 80 MHz

  logic [33:0] fifo_data; logic fifo_empty, fifo_rd, bf_send = 0;
  logic [15:0] cable_data; logic cable_phase, cable_frame, cable_bf;
  int checks = 0, failures = 0;

  arctic_link_tx dut (.*);

  logic [33:0] q [$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 34'h0 : q[0];
  // pop just after the edge, so the design samples the old head first
  always @(posedge clk) begin
    bit p;
    p = fifo_rd && !fifo_empty;
    #1;
    if (p) void'(q.pop_front());
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // independent cable decoder
  logic [15:0] p_data; logic p_phase, p_frame, p_bf, p_valid = 0;
  logic [32:0] dec [$];           // {frame, word} per pair
  int bf_pairs = 0, phase_errs = 0, manch_errs = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (p_valid) begin
        if (cable_phase == p_phase) phase_errs++;
        if (cable_phase && !p_phase) begin
          if (!(p_frame ^ cable_frame) || !(p_bf ^ cable_bf)) manch_errs++;
          dec.push_back({p_frame, p_data, cable_data});
          if (p_bf) bf_pairs++;
        end
      end
      p_data <= cable_data; p_phase <= cable_phase; p_frame <= cable_frame; p_bf <= cable_bf;
      p_valid <= 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] sent [$];
    int first, n_before;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    // one packet of 10 words (frame true), CRC-like word (frame false), idle word
    for (int i = 0; i < 10; i++) begin q.push_back({1'b1, 1'b0, 32'h1000_0000 + 32'(i)}); sent.push_back({1'b1, 32'h1000_0000 + 32'(i)}); end
    q.push_back({1'b0, 1'b0, 32'h0000_BEEF}); sent.push_back({1'b0, 32'h0000_BEEF});
    q.push_back({1'b0, 1'b1, 32'h0});         sent.push_back({1'b0, 32'h0});
    n_before = dec.size();
    // BUFFER_FREE requests: two back to back, one alone
    @(negedge clk); bf_send = 1; @(negedge clk); @(negedge clk); bf_send = 0;
    repeat (7) @(negedge clk); bf_send = 1; @(negedge clk); bf_send = 0;
    repeat (60) @(negedge clk);
    chk(phase_errs == 0, "PHASE toggles every cycle");
    chk(manch_errs == 0, "FRAME and BUFFER_FREE are Manchester pairs");
    chk(bf_pairs == 3, $sformatf("three BUFFER_FREE pairs, saw %0d", bf_pairs));
    // locate the first sent word in the decoded stream
    first = -1;
    foreach (dec[k]) if (k >= n_before && dec[k] == sent[0] && first < 0) first = k;
    chk(first >= 0, "first word found on the cable");
    if (first >= 0) begin
      for (int i = 0; i < sent.size(); i++)
        chk(dec[first + i] == sent[i], $sformatf("pair %0d: %h expected %h", i, dec[first + i], sent[i]));
      for (int k = first + sent.size(); k < dec.size(); k++)
        chk(dec[k] == sent[sent.size() - 1], "idle word repeats while the FIFO is empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
