// tb_arctic_link_rx: Arctic cable receiver.
// A testbench encoder drives the cable pair by pair (upper half first, PHASE low then
// high, FRAME and BUFFER_FREE Manchester coded) and can inject a PHASE slip, a FRAME
// or a BUFFER_FREE violation. A queue stands in for the NIC receive FIFO, honouring
// commit and abort. Checked: packets arrive whole with the last flag on the word sent
// with FRAME false; nothing is received while disabled; BUFFER_FREE pairs are
// counted; a BUFFER_FREE violation is reported and ignored without disturbing the
// packet; a FRAME or PHASE error is reported, drops the partial packet and disables
// the receiver until enable is toggled.
module tb_arctic_link_rx;
  logic clk = 0, rst_n = 1, enable = 0;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous resets act at once
  always #6.25 clk = ~clk;
  logic [15:0] cable_data = '0; logic cable_phase = 0, cable_frame = 0, cable_bf = 0;
  logic fifo_wr, fifo_commit, fifo_abort, fifo_full;
  logic [32:0] fifo_wdata;
  logic bf_rcvd, err_phase, err_frame, err_bf, overflow;
  int checks = 0, failures = 0;

  arctic_link_rx dut (.*);

  // receive FIFO model
  logic [32:0] pending [$], got [$];
  assign fifo_full = 1'b0;
  always @(posedge clk) begin
    if (fifo_abort) pending.delete();
    else begin
      if (fifo_wr) pending.push_back(fifo_wdata);
      if (fifo_commit) begin foreach (pending[k]) got.push_back(pending[k]); pending.delete(); end
    end
  end
  int n_bf = 0, n_ephase = 0, n_eframe = 0, n_ebf = 0;
  always @(posedge clk) begin
    n_bf += int'(bf_rcvd); n_ephase += int'(err_phase); n_eframe += int'(err_frame); n_ebf += int'(err_bf);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // one pair on the cable
  task automatic pair(input logic [31:0] w, input bit fr, input bit bf,
                      input bit slip = 0, input bit bad_fr = 0, input bit bad_bf = 0);
    @(negedge clk);
    cable_data = w[31:16]; cable_phase = 0; cable_frame = fr; cable_bf = bf;
    @(negedge clk);
    cable_data = w[15:0]; cable_phase = slip ? 1'b0 : 1'b1;
    cable_frame = bad_fr ? fr : !fr; cable_bf = bad_bf ? bf : !bf;
  endtask
  task automatic idle(input int n); repeat (n) pair(32'h0, 0, 0); endtask
  task automatic packet(input int len, input logic [15:0] tagv);
    for (int i = 0; i < len; i++) pair({tagv, 16'(i)}, i != len - 1, 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    idle(3);
    packet(4, 16'hD15A);            // receiver disabled: ignored
    idle(2);
    chk(got.size() == 0, "nothing received while disabled");
    enable = 1;
    idle(3);
    packet(5, 16'hAAAA);
    idle(2);
    chk(got.size() == 5, $sformatf("five words received, got %0d", got.size()));
    for (int i = 0; i < 5 && i < got.size(); i++)
      chk(got[i] == {1'(i == 4), 16'hAAAA, 16'(i)}, $sformatf("word %0d = %h", i, got[i]));
    // BUFFER_FREE during idle and inside a packet, one corrupted
    pair(32'h0, 0, 1);
    pair(32'h1234_0000, 1, 1);
    pair(32'h1234_0001, 1, 1, 0, 0, 1);   // BUFFER_FREE violation inside the packet
    pair(32'h1234_0002, 0, 0);
    idle(2);
    chk(n_bf == 2, $sformatf("two BUFFER_FREE received, got %0d", n_bf));
    chk(n_ebf == 1, "BUFFER_FREE violation reported");
    chk(got.size() == 8 && got[7] == {1'b1, 32'h1234_0002}, "packet survives BUFFER_FREE error");
    // FRAME error inside a packet: partial packet dropped, receiver disabled
    pair(32'hBBBB_0000, 1, 0);
    pair(32'hBBBB_0001, 1, 0, 0, 1, 0);
    pair(32'hBBBB_0002, 0, 0);
    idle(2);
    packet(3, 16'hCCCC);
    idle(2);
    chk(n_eframe == 1, "FRAME error reported");
    chk(got.size() == 8, "partial and later packets dropped after FRAME error");
    // re-enable, then a PHASE slip
    enable = 0; idle(2); enable = 1; idle(3);
    packet(3, 16'hEEEE);
    idle(2);
    chk(got.size() == 11, "reception resumes after re-enable");
    pair(32'hF0F0_0000, 1, 0);
    pair(32'hF0F0_0001, 1, 0, 1, 0, 0);   // PHASE fails to toggle
    pair(32'hF0F0_0002, 0, 0);
    idle(3);
    chk(n_ephase >= 1, "PHASE error reported");
    chk(got.size() == 11, "packet with PHASE error dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
