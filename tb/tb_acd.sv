// tb_acd: address capture device with the DPSRAM, the SP side driven through DPSRAM
// port B and the ACD registers, the PCI-chip side by a requester that gives up
// (time-out, i.e. a PCI retry) after 12 cycles without gsm_ready.
// Expected results come from a small reference model of the tag/control rules kept in
// the testbench. Covered: read hit in set 0 and set 1, read miss (retry, interrupt,
// capture, later accesses ignored until re-enabled), writes to writable lines,
// write miss, write into a non-coherent line with another tag (accepted, interrupts),
// write to a non-coherent line with the same tag (no interrupt), interrupt-on-read
// (split-phase read), interrupt-on-write, an access outside the GSM window (ignored),
// and the response time (gsm_ready on the third clock edge after the request).
module tb_acd;
  import startjr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous resets act at once
  always #5 clk = ~clk;

  logic gsm_req = 0, gsm_we = 0, gsm_ready;
  logic [31:0] gsm_addr = '0, gsm_wdata = '0, gsm_rdata;
  logic dp_en, dp_we; logic [11:0] dp_addr; logic [31:0] dp_wdata, dp_rdata;
  logic b_en = 0, b_we = 0; logic [11:0] b_addr = '0; logic [31:0] b_wdata = '0, b_rdata;
  logic sp_sel = 0, sp_we = 0; logic [1:0] sp_addr = '0; logic [31:0] sp_wdata = '0, sp_rdata;
  logic irq;
  int checks = 0, failures = 0;

  acd dut (.clk, .rst_n, .gsm_req, .gsm_we, .gsm_addr, .gsm_wdata, .gsm_ready, .gsm_rdata,
           .dp_en, .dp_we, .dp_addr, .dp_wdata, .dp_rdata,
           .sp_sel, .sp_we, .sp_addr, .sp_wdata, .sp_rdata, .irq);
  dpsram u_mem (.clk, .a_en(dp_en), .a_we(dp_we), .a_addr(dp_addr), .a_wdata(dp_wdata), .a_rdata(dp_rdata),
                .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic dp_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); b_en = 1; b_we = 1; b_addr = a; b_wdata = d;
    @(negedge clk); b_en = 0; b_we = 0;
  endtask
  task automatic dp_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); b_en = 1; b_we = 0; b_addr = a;
    @(negedge clk); b_en = 0; d = b_rdata;
  endtask
  task automatic reg_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); sp_sel = 1; sp_we = 1; sp_addr = a; sp_wdata = d;
    @(negedge clk); sp_sel = 0; sp_we = 0;
  endtask
  task automatic reg_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk); sp_sel = 1; sp_we = 0; sp_addr = a;
    @(negedge clk); sp_sel = 0; d = sp_rdata;
  endtask

  // GSM access; returns whether it completed, its read data and the cycles it took
  task automatic gsm(input bit we, input logic [31:0] a, input logic [31:0] d,
                     output bit done, output logic [31:0] rd, output int cyc);
    @(negedge clk); gsm_req = 1; gsm_we = we; gsm_addr = a; gsm_wdata = d;
    done = 0; cyc = 0;
    for (int i = 1; i <= 12; i++) begin
      @(posedge clk); #1;
      if (gsm_ready) begin done = 1; rd = gsm_rdata; cyc = i; break; end
    end
    @(negedge clk); gsm_req = 0;
    repeat (2) @(negedge clk);
  endtask

  function automatic logic [31:0] tagword(input logic [31:0] a, input bit r, w, nc, iw, ir);
    tagctl_t t;
    t = '0;
    t.tag = a[26:12]; t.r = r; t.w = w; t.nc = nc; t.iw = iw; t.ir = ir;
    return t;
  endfunction

  function automatic logic [31:0] gaddr(input int tag, input int idx, input bit wil);
    return GSM_BASE | (32'(tag) << 12) | (32'(idx) << 3) | (32'(wil) << 2);
  endfunction

  task automatic expect_capture(input logic [31:0] a, input bit we, input acd_cause_e c,
                                input bit done, input string msg);
    logic [31:0] v;
    chk(irq == 1, {msg, ": irq"});
    reg_read(2'd0, v); chk(v == a, $sformatf("%s: captured address %h", msg, v));
    reg_read(2'd1, v); chk(v[2:0] == c && v[3] == we && v[8] == done,
                           $sformatf("%s: captured info %h", msg, v));
    reg_read(2'd3, v); chk(v[0] == 0, {msg, ": disabled after interrupt"});
  endtask

  initial begin
    bit done; logic [31:0] rd, v; int cyc;
    logic [31:0] A0, A1, A2, A3, A4, A5;
    repeat (3) @(negedge clk); rst_n = 1;

    // tag space: line 5 set 0 holds tag 0x11 readable, set 1 tag 0x22 readable+writable
    A0 = gaddr(16'h11, 5, 0); A1 = gaddr(16'h22, 5, 1);
    dp_write(dp_tag_addr(0, 5), tagword(A0, 1, 0, 0, 0, 0));
    dp_write(dp_tag_addr(1, 5), tagword(A1, 1, 1, 0, 0, 0));
    dp_write(dp_data_addr(0, 5, 0), 32'hAAAA0000);
    dp_write(dp_data_addr(1, 5, 1), 32'hBBBB0001);

    // disabled after reset: no answer
    gsm(0, A0, 0, done, rd, cyc);
    chk(!done, "no answer while disabled after reset");
    reg_write(2'd3, 1);

    gsm(0, A0, 0, done, rd, cyc);
    chk(done && rd == 32'hAAAA0000, $sformatf("read hit set 0: %0d %h", done, rd));
    chk(cyc == 3, $sformatf("read hit answered on the third edge, took %0d", cyc));
    chk(!irq, "no irq on plain hit");
    gsm(0, A1, 0, done, rd, cyc);
    chk(done && rd == 32'hBBBB0001, "read hit set 1");

    // write to writable set 1
    gsm(1, A1, 32'h12345678, done, rd, cyc);
    chk(done && cyc == 3 && !irq, "write hit set 1");
    dp_read(dp_data_addr(1, 5, 1), v); chk(v == 32'h12345678, "write landed in set 1");

    // write to set 0 (readable, not writable): retried, interrupt
    gsm(1, A0, 32'h55, done, rd, cyc);
    chk(!done, "write to non-writable line retried");
    expect_capture(A0, 1, CAUSE_WR_MISS, 0, "write miss");
    dp_read(dp_data_addr(0, 5, 0), v); chk(v == 32'hAAAA0000, "retried write left data alone");

    // further accesses ignored until re-enabled, even hits
    gsm(0, A1, 0, done, rd, cyc);
    chk(!done, "hit ignored while interrupt pending");
    reg_write(2'd3, 1);
    chk(!irq, "irq cleared by re-enable");

    // read miss (tag mismatch)
    A2 = gaddr(16'h33, 5, 0);
    gsm(0, A2, 0, done, rd, cyc);
    chk(!done, "read miss retried");
    expect_capture(A2, 0, CAUSE_RD_MISS, 0, "read miss");
    // SP services it: fills set 0 and re-enables, the retry then hits
    dp_write(dp_data_addr(0, 5, 0), 32'hC0FFEE00);
    dp_write(dp_tag_addr(0, 5), tagword(A2, 1, 0, 0, 0, 0));
    reg_write(2'd3, 1);
    gsm(0, A2, 0, done, rd, cyc);
    chk(done && rd == 32'hC0FFEE00 && !irq, "retried read hits after service");

    // non-coherent set 0 on line 9 with an unmapped tag: writes accepted, interrupting
    A3 = gaddr(16'h44, 9, 1);
    dp_write(dp_tag_addr(0, 9), tagword(gaddr(16'h7FFF, 9, 0), 0, 0, 1, 0, 0));
    dp_write(dp_tag_addr(1, 9), tagword(gaddr(16'h45, 9, 0), 1, 0, 0, 0, 0));
    gsm(1, A3, 32'hFEEDF00D, done, rd, cyc);
    chk(done, "write accepted by non-coherent line");
    expect_capture(A3, 1, CAUSE_WR_NC, 1, "non-coherent write");
    reg_read(2'd2, v); chk(v == 32'hFEEDF00D, "captured write data");
    dp_read(dp_data_addr(0, 9, 1), v); chk(v == 32'hFEEDF00D, "non-coherent write landed in set 0");
    reg_write(2'd3, 1);

    // non-coherent line with matching tag: accepted without interrupt
    A4 = gaddr(16'h7FFF, 9, 0);
    gsm(1, A4, 32'h0BADCAFE, done, rd, cyc);
    chk(done && !irq, "non-coherent matching write, no interrupt");

    // split-phase read: interrupt on any read access
    A5 = gaddr(16'h66, 100, 0);
    dp_write(dp_tag_addr(1, 100), tagword(A5, 1, 0, 0, 0, 1));
    dp_write(dp_data_addr(1, 100, 0), 32'h5A5A5A5A);   // miss pattern
    dp_write(dp_tag_addr(0, 100), tagword(gaddr(16'h1, 100, 0), 0, 0, 0, 0, 0));
    gsm(0, A5, 0, done, rd, cyc);
    chk(done && rd == 32'h5A5A5A5A, "split-phase read returns miss pattern");
    expect_capture(A5, 0, CAUSE_RD_IR, 1, "interrupt on read");
    reg_write(2'd3, 1);

    // interrupt on write
    dp_write(dp_tag_addr(1, 100), tagword(A5, 1, 1, 0, 1, 0));
    gsm(1, A5, 32'h77, done, rd, cyc);
    chk(done, "write with interrupt-on-write completes");
    expect_capture(A5, 1, CAUSE_WR_IW, 1, "interrupt on write");
    reg_write(2'd3, 1);

    // outside the GSM window: ignored, no interrupt
    gsm(0, 32'h8000_0000, 0, done, rd, cyc);
    chk(!done && !irq, "access outside window ignored");

    // random hits and misses against the reference rules
    for (int n = 0; n < 200; n++) begin
      int idx; bit we; logic [31:0] a; tagctl_t t0, t1; bit exp_ok;
      idx = $urandom_range(0, 511);
      t0 = tagword(gaddr($urandom_range(1, 3), idx, 0), 1'($urandom), 1'($urandom), 1'($urandom_range(0,4)==0), 0, 0);
      t1 = tagword(gaddr($urandom_range(1, 3), idx, 0), 1'($urandom), 1'($urandom), 1'($urandom_range(0,4)==0), 0, 0);
      dp_write(dp_tag_addr(0, idx), t0);
      dp_write(dp_tag_addr(1, idx), t1);
      we = 1'($urandom);
      a = gaddr($urandom_range(1, 3), idx, 1'($urandom));
      if (!we) exp_ok = (t0.tag == a[26:12] && t0.r) || (t1.tag == a[26:12] && t1.r);
      else     exp_ok = (t0.tag == a[26:12] && (t0.w || t0.nc)) || (t1.tag == a[26:12] && (t1.w || t1.nc)) || t0.nc || t1.nc;
      gsm(we, a, $urandom, done, rd, cyc);
      chk(done == exp_ok, $sformatf("random access %0d we=%0d", n, we));
      if (irq) reg_write(2'd3, 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
