// tb_pkt_fifo: dual-clock packet FIFO test.
// A writer on a 10 ns clock sends random-length packets, sometimes abandoning one
// half way with wr_abort; a reader on a 13 ns clock pops whenever words are visible.
// Checked against a scoreboard of committed packets: order and content of every word,
// that no word of an aborted or still uncommitted packet is ever visible, that the
// reader never sees part of a packet before its last word was committed, and that
// full and wr_free behave at a depth of 16.
module tb_pkt_fifo;
  localparam int WIDTH = 33, DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  initial begin #1 wrst_n = 0; rrst_n = 0; end  // real falling edges for the asynchronous resets
  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  logic wr_en, wr_commit, wr_abort, wr_full, rd_en, rd_empty;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] wr_free;
  int checks = 0, failures = 0;

  pkt_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] committed [$];
  int committed_pkts = 0, read_pkts = 0, aborts = 0, full_seen = 0;
  bit writer_done = 0;

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // writer
  initial begin
    logic [WIDTH-1:0] pkt [$];
    wr_en = 0; wr_commit = 0; wr_abort = 0; wr_data = '0;
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    @(negedge wclk);
    chk(wr_free == (DEPTH), "free after reset");
    for (int p = 0; p < 300; p++) begin
      int len;
      bit do_abort;
      len = $urandom_range(1, 6);
      do_abort = ($urandom_range(0, 5) == 0);
      pkt.delete();
      for (int i = 0; i < len; i++) begin
        logic [WIDTH-1:0] w;
        w = {1'(i == len - 1), 16'(p), 16'(i)};
        while (wr_full) begin full_seen++; @(negedge wclk); end
        wr_en = 1; wr_data = w; wr_commit = (i == len - 1) && !do_abort;
        pkt.push_back(w);
        @(negedge wclk);
        wr_en = 0; wr_commit = 0;
        if ($urandom_range(0, 3) == 0) @(negedge wclk);
      end
      if (do_abort) begin
        wr_abort = 1; @(negedge wclk); wr_abort = 0; aborts++;
      end else begin
        foreach (pkt[k]) committed.push_back(pkt[k]);
        committed_pkts++;
      end
    end
    writer_done = 1;
  end

  // reader: slow at times so the FIFO fills
  int rd_words = 0;
  initial begin
    rd_en = 0;
    @(posedge rrst_n);
    forever begin
      @(negedge rclk);
      rd_en = 0;
      if (!rd_empty && ($urandom_range(0, 2) != 0 || writer_done)) begin
        chk(committed.size() > 0, "word visible before commit");
        if (committed.size() > 0) begin
          logic [WIDTH-1:0] e;
          e = committed.pop_front();
          chk(rd_data == e, $sformatf("data %h expected %h", rd_data, e));
          if (e[WIDTH-1]) read_pkts++;
        end
        rd_en = 1;
        rd_words++;
      end
      if (writer_done && rd_empty && committed.size() == 0) break;
    end
    @(negedge wclk);
    repeat (6) @(negedge wclk);
    chk(wr_free == (DEPTH), "free after drain");
    chk(read_pkts == committed_pkts, "all committed packets read");
    chk(aborts > 0, "aborts exercised");
    chk(full_seen > 0, "full flag exercised");
    $display("packets=%0d aborted=%0d full_waits=%0d", read_pkts, aborts, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
