// startjr_pkg: types and constants shared by the StarT-jr network adapter RTL.
//
// Groups three kinds of definitions:
//  * global shared memory (GSM) address map, the dual-ported SRAM (DPSRAM) layout and
//    the tag/control word of the two-set level-one GSM cache used by the address
//    capture device (acd);
//  * word formats used between the service processor (SP) and the Arctic NIC:
//    the register-request header, the response identification word, the error register;
//  * Arctic link constants: three receive buffers per router input, maximum packet
//    length of 24 words (96 bytes).
// The GSM window 0xC0000000-0xC7FFFFFF, the 16 KB DPSRAM split (half data, one quarter
// tags, one quarter scratch), two sets, two-word lines, the 96-byte maximum packet and
// the three Arctic buffers follow the published description. The bit positions inside
// the tag/control word, the header and the error register, and the idle pattern value,
// are this design's own choices.
package startjr_pkg;

  // ---------------------------------------------------------------- GSM / DPSRAM
  localparam logic [31:0] GSM_BASE      = 32'hC000_0000;   // 128 MB window
  localparam int unsigned GSM_ADDR_BITS = 27;              // byte address bits inside window
  localparam int unsigned DP_WORDS      = 4096;            // 16 KB of 32-bit words
  localparam int unsigned DP_AW         = 12;
  localparam int unsigned L1_INDEX_BITS = 9;               // 512 two-word lines per set
  localparam int unsigned L1_TAG_BITS   = GSM_ADDR_BITS - 3 - L1_INDEX_BITS;  // 15

  // DPSRAM word map: 0x000-0x3FF set 0 data, 0x400-0x7FF set 1 data,
  // 0x800-0x9FF set 0 tag/control, 0xA00-0xBFF set 1 tag/control, 0xC00-0xFFF scratch.
  function automatic logic [DP_AW-1:0] dp_data_addr(input logic set,
                                                    input logic [L1_INDEX_BITS-1:0] idx,
                                                    input logic wil);
    return {1'b0, set, idx, wil};
  endfunction

  function automatic logic [DP_AW-1:0] dp_tag_addr(input logic set,
                                                   input logic [L1_INDEX_BITS-1:0] idx);
    return {2'b10, set, idx};
  endfunction

  // Tag/control word held in GSM tag space, one per line per set.
  typedef struct packed {
    logic [L1_TAG_BITS-1:0] tag;     // [31:17] GSM address bits 26:12
    logic [11:0]            rsvd;    // [16:5]  free for protocol software
    logic                   ir;      // [4] interrupt on any read access (split-phase reads)
    logic                   iw;      // [3] interrupt after a completed write
    logic                   nc;      // [2] non-coherent: accepts any write, interrupting on tag mismatch
    logic                   w;       // [1] writable (block owned)
    logic                   r;       // [0] readable
  } tagctl_t;

  // Why the ACD interrupted the SP (capture register field).
  typedef enum logic [2:0] {
    CAUSE_NONE     = 3'd0,
    CAUSE_RD_MISS  = 3'd1,   // read not available: retried
    CAUSE_WR_MISS  = 3'd2,   // write not eligible: retried
    CAUSE_RD_IR    = 3'd3,   // read completed on a line with interrupt-on-read
    CAUSE_WR_NC    = 3'd4,   // write accepted into a non-coherent line with other tag
    CAUSE_WR_IW    = 3'd5    // write completed on a line with interrupt-on-write
  } acd_cause_e;

  // ---------------------------------------------------------------- messages
  localparam int unsigned MAX_PKT_WORDS  = 24;   // 96 bytes
  localparam int unsigned ARCTIC_BUFFERS = 3;    // packet buffers per Arctic receive section
  localparam logic [31:0] IDLE_WORD      = 32'h0000_0000;

  localparam int unsigned HDR_REGREQ_BIT = 31;   // first word: register request, not a packet
  localparam int unsigned HDR_PRIO_BIT   = 30;   // first word of a packet: 1 = high priority

  typedef enum logic [3:0] {
    REG_RX_ENABLE = 4'h1,   // two words: header, argument (bit 0 = enable); returns and clears errors
    REG_READ_ERR  = 4'h2    // one word: returns error register without clearing it
  } reg_op_e;

  // Response identification word: bit 31 set, opcode in [3:0].
  function automatic logic [31:0] resp_id(input reg_op_e op);
    return {1'b1, 27'd0, op};
  endfunction

  typedef struct packed {
    logic crc;      // [3] received packet failed CRC
    logic bf;       // [2] BUFFER_FREE Manchester violation
    logic phase;    // [1] PHASE failed to toggle
    logic frame;    // [0] FRAME Manchester violation
  } nic_err_t;

endpackage
