// acd: Address Capture Device of the global shared memory (GSM) cache.
//
// Sits on the Cyclone card's local bus, where the PCI interface chip presents host
// accesses to the 128 MB GSM window 0xC0000000-0xC7FFFFFF (aligned 32-bit words).
// The level-one cache lives in the DPSRAM: two sets of 512 two-word lines, with one
// tag/control word per line and set (layout and fields in startjr_pkg). For each GSM
// access the ACD
//   1. reads the set 0 and set 1 tag/control words of the line (two cycles on port A);
//   2. decides:
//        read   completes from a set whose tag matches and which is readable (set 0
//               first); interrupts afterwards if that line has interrupt-on-read;
//        write  completes into a set whose tag matches and which is writable or
//               non-coherent (set 0 first), interrupting if the line has
//               interrupt-on-write; otherwise into a non-coherent set whose tag differs,
//               always interrupting;
//        anything else is not answered: gsm_ready never rises, the PCI chip times out
//               and retries the host access, and the SP is interrupted;
//   3. completes an accepted access through port A and raises gsm_ready for one
//      cycle, with read data on gsm_rdata: the request is sampled on edge 0 and
//      gsm_ready is high between edges 2 and 3 (tag 0, tag 1, data).
// Whenever it interrupts, the ACD records the access (address, write data, direction,
// set, cause, whether it completed) and disables itself: every later GSM access goes
// unanswered until the SP re-enables it through the control register. It also comes
// out of reset disabled, so the SP can set up tag space first. The requester holds
// gsm_req until gsm_ready or its own time-out, and the ACD waits for the request to
// drop before accepting another.
// SP registers (sp_addr): 0 captured address, 1 captured info {23'0, completed, 3'0,
// set, we, cause[2:0]}, 2 captured write data, 3 control: read {30'0, irq, enabled},
// write bit 0 = enabled (writing 1 also clears irq). Read data valid the next cycle.
// From the document: the two tag reads, retry by not answering, interrupt and disable
// until serviced, the write eligibility rules, non-coherent lines and interrupt on any
// read. This design's own: tag/control bit positions, set 0 priority, the exact cycle
// timing and the register map.
module acd
  import startjr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // GSM access from the PCI interface chip
  input  logic        gsm_req,
  input  logic        gsm_we,
  input  logic [31:0] gsm_addr,
  input  logic [31:0] gsm_wdata,
  output logic        gsm_ready,
  output logic [31:0] gsm_rdata,
  // DPSRAM port A
  output logic        dp_en,
  output logic        dp_we,
  output logic [DP_AW-1:0] dp_addr,
  output logic [31:0] dp_wdata,
  input  logic [31:0] dp_rdata,
  // SP registers
  input  logic        sp_sel,
  input  logic        sp_we,
  input  logic [1:0]  sp_addr,
  input  logic [31:0] sp_wdata,
  output logic [31:0] sp_rdata,
  output logic        irq
);
  typedef enum logic [2:0] {A_IDLE, A_TAG1, A_DECIDE, A_DATA, A_WAIT} acd_state_e;
  acd_state_e state;

  logic        enabled;
  logic [31:0] a_addr, a_wdata;
  logic        a_we;
  tagctl_t     tag0_q, tag1;
  logic [L1_TAG_BITS-1:0]   a_tag;
  logic [L1_INDEX_BITS-1:0] a_idx;
  logic                     a_wil;
  assign a_tag = a_addr[GSM_ADDR_BITS-1:GSM_ADDR_BITS-L1_TAG_BITS];
  assign a_idx = a_addr[3+L1_INDEX_BITS-1:3];
  assign a_wil = a_addr[2];
  assign tag1  = tagctl_t'(dp_rdata);

  logic in_window;
  assign in_window = gsm_addr[31:GSM_ADDR_BITS] == GSM_BASE[31:GSM_ADDR_BITS];

  // ---------------------------------------------------------------- decision (A_DECIDE)
  logic       m0, m1, ok, sel, intr;
  acd_cause_e cause;
  always_comb begin
    m0 = tag0_q.tag == a_tag;
    m1 = tag1.tag   == a_tag;
    ok = 1'b0; sel = 1'b0; intr = 1'b1; cause = a_we ? CAUSE_WR_MISS : CAUSE_RD_MISS;
    if (!a_we) begin
      if (m0 && tag0_q.r) begin
        ok = 1'b1; sel = 1'b0; intr = tag0_q.ir;
      end else if (m1 && tag1.r) begin
        ok = 1'b1; sel = 1'b1; intr = tag1.ir;
      end
      if (ok) cause = intr ? CAUSE_RD_IR : CAUSE_NONE;
    end else begin
      if (m0 && (tag0_q.w || tag0_q.nc)) begin
        ok = 1'b1; sel = 1'b0; intr = tag0_q.iw; cause = intr ? CAUSE_WR_IW : CAUSE_NONE;
      end else if (m1 && (tag1.w || tag1.nc)) begin
        ok = 1'b1; sel = 1'b1; intr = tag1.iw;   cause = intr ? CAUSE_WR_IW : CAUSE_NONE;
      end else if (tag0_q.nc) begin
        ok = 1'b1; sel = 1'b0; intr = 1'b1;      cause = CAUSE_WR_NC;
      end else if (tag1.nc) begin
        ok = 1'b1; sel = 1'b1; intr = 1'b1;      cause = CAUSE_WR_NC;
      end
    end
  end

  // ---------------------------------------------------------------- DPSRAM port A
  always_comb begin
    dp_en    = 1'b0;
    dp_we    = 1'b0;
    dp_addr  = dp_tag_addr(1'b0, gsm_addr[3+L1_INDEX_BITS-1:3]);
    dp_wdata = a_wdata;
    unique case (state)
      A_IDLE:   dp_en = gsm_req && enabled && in_window;
      A_TAG1: begin
        dp_en   = 1'b1;
        dp_addr = dp_tag_addr(1'b1, a_idx);
      end
      A_DECIDE: begin
        dp_en   = ok;
        dp_we   = ok && a_we;
        dp_addr = dp_data_addr(sel, a_idx, a_wil);
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- control
  logic       p_intr, p_sel, cap_done, cap_set, cap_we;
  acd_cause_e p_cause, cap_cause;
  logic [31:0] cap_addr, cap_wdata;

  assign gsm_ready = (state == A_DATA);
  assign gsm_rdata = dp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= A_IDLE;
      enabled   <= 1'b0;
      irq       <= 1'b0;
      a_addr    <= '0;
      a_wdata   <= '0;
      a_we      <= 1'b0;
      tag0_q    <= '0;
      p_intr    <= 1'b0;
      p_sel     <= 1'b0;
      p_cause   <= CAUSE_NONE;
      cap_addr  <= '0;
      cap_wdata <= '0;
      cap_we    <= 1'b0;
      cap_set   <= 1'b0;
      cap_done  <= 1'b0;
      cap_cause <= CAUSE_NONE;
      sp_rdata  <= '0;
    end else begin
      unique case (state)
        A_IDLE: if (gsm_req && enabled && in_window) begin
          a_addr  <= gsm_addr;
          a_we    <= gsm_we;
          a_wdata <= gsm_wdata;
          state   <= A_TAG1;
        end
        A_TAG1: begin
          tag0_q <= tagctl_t'(dp_rdata);
          state  <= A_DECIDE;
        end
        A_DECIDE: begin
          p_intr  <= intr;
          p_sel   <= sel;
          p_cause <= cause;
          if (ok) begin
            state <= A_DATA;
          end else begin
            enabled   <= 1'b0;
            irq       <= 1'b1;
            cap_addr  <= a_addr;
            cap_wdata <= a_wdata;
            cap_we    <= a_we;
            cap_set   <= sel;
            cap_done  <= 1'b0;
            cap_cause <= cause;
            state     <= A_WAIT;
          end
        end
        A_DATA: begin
          if (p_intr) begin
            enabled   <= 1'b0;
            irq       <= 1'b1;
            cap_addr  <= a_addr;
            cap_wdata <= a_wdata;
            cap_we    <= a_we;
            cap_set   <= p_sel;
            cap_done  <= 1'b1;
            cap_cause <= p_cause;
          end
          state <= A_WAIT;
        end
        A_WAIT: if (!gsm_req) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase

      // SP register access (a write in the same cycle as a new capture loses to it)
      if (sp_sel && sp_we && sp_addr == 2'd3) begin
        if (!(state == A_DECIDE && !ok) && !(state == A_DATA && p_intr)) begin
          enabled <= sp_wdata[0];
          if (sp_wdata[0]) irq <= 1'b0;
        end
      end
      if (sp_sel && !sp_we) begin
        unique case (sp_addr)
          2'd0: sp_rdata <= cap_addr;
          2'd1: sp_rdata <= {23'd0, cap_done, 3'd0, cap_set, cap_we, cap_cause};
          2'd2: sp_rdata <= cap_wdata;
          2'd3: sp_rdata <= {30'd0, irq, enabled};
        endcase
      end
    end
  end

  // The requester keeps its request stable until it is answered or times out.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {A_TAG1, A_DECIDE}) |-> (gsm_req && gsm_addr == a_addr && gsm_we == a_we))
    else $error("GSM request changed while being served");
endmodule
