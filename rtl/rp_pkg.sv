// rp_pkg: types and constants shared by the rule processor.
//
// The rule processor correlates header match IDs (HIDs) and content match IDs
// (CIDs) reported by plug-in scanning modules into rule matches. All modules
// exchange 32-bit words over a wrapper bus (sod/eod/en/data/vb with a stop
// back-pressure signal). Inside the processor a single token type travels the
// seven pipeline stages. ID spaces of 2**15 = 32,768 entries follow the
// supported rule count; the 16-bit flow ID, the 36-bit SRAM word, the 18-bit
// SRAM address and all opcode/flag encodings are this design's own choices.
package rp_pkg;

  localparam int unsigned DATA_W  = 32;  // wrapper bus word (32-bit input size)
  localparam int unsigned VB_W    = 3;   // valid-byte count 0..4
  localparam int unsigned ID_W    = 15;  // CID / HID / RID width (32,768 IDs)
  localparam int unsigned FLOW_W  = 16;  // flow ID width (half of a header word)
  localparam int unsigned CNT_W   = 4;   // signature count, up to 15 per rule
  localparam int unsigned SRAM_AW = 18;  // ZBT SRAM word address
  localparam int unsigned SRAM_DW = 36;  // ZBT SRAM word
  localparam int unsigned CTX_WORDS = 32;   // 512 bytes of context per flow
  localparam int unsigned SD_DW   = 128; // context transfer word (512 B / 32)
  localparam int unsigned SD_AW   = FLOW_W + $clog2(CTX_WORDS);
  localparam int unsigned NUM_EV  = 11;  // event counters

  // One word of the wrapper bus.
  typedef struct packed {
    logic              sod;   // first word of a message
    logic              eod;   // last word of a message
    logic              en;    // word present
    logic [DATA_W-1:0] data;
    logic [VB_W-1:0]   vb;    // number of valid bytes in data
  } wbus_t;

  // Message flags (upper half of the first word of an ID or alert message).
  localparam logic [15:0] FLAG_HEADER = 16'h0001; // ID message carries HIDs
  localparam logic [15:0] FLAG_ALERT  = 16'h0001; // alert message
  localparam logic [15:0] FLAG_AOVF   = 16'h0002; // alert list overflowed
  localparam logic [3:0]  RESP_TAG    = 4'hC;     // top nibble of a control response

  // Control opcodes (bits 31:28 of the first control word).
  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,
    OP_WR_A   = 4'h1,  // write SRAM bank A (CID -> RID lists)
    OP_RD_A   = 4'h2,
    OP_WR_B   = 4'h3,  // write SRAM bank B (RID -> HID map, rule CID lists)
    OP_RD_B   = 4'h4,
    OP_WR_REQ = 4'h5,  // write required-count block RAM
    OP_RD_REQ = 4'h6,
    OP_WR_CFG = 4'h7,  // configuration register
    OP_RD_EVT = 4'h8,  // read an event counter
    OP_WR_FCAM = 4'h9, // frequent-CID unit: entry {valid, CID, table start}
    OP_WR_FTAB = 4'hA  // frequent-CID unit: table word
  } op_e;

  // Pipeline token.
  typedef enum logic [1:0] {
    TK_ID     = 2'd0,  // a CID (stages 2-3) or a RID (stages 4-7)
    TK_EOM    = 2'd1,  // end of one ID message
    TK_DIRECT = 2'd2,  // header-only rule match, bypasses the count check
    TK_RID    = 2'd3   // a RID from the frequent-CID unit, header already checked
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e          kind;
    logic [ID_W-1:0]    id;     // CID or RID
    logic [ID_W-1:0]    hid;    // HID of the rule (after stage 4)
    logic               pvalid; // rule has a CID list
    logic [SRAM_AW-1:0] ptr;    // head of the rule's CID list in bank B
  } tok_t;

  // Linked-list node held in either SRAM bank (35 of the 36 bits used).
  // Bank A, address CID or free node: {valid, RID, next valid, next}.
  // Bank B, address RID: {valid, HID, CID list valid, CID list head};
  // bank B, CID list node: {valid, CID, next valid, next}.
  typedef struct packed {
    logic               valid;
    logic [ID_W-1:0]    id;
    logic               nvalid;
    logic [SRAM_AW-1:0] next;
  } node_t;

  // Context entry, 32 bits; four per 128-bit context word.
  typedef enum logic [1:0] {CE_NONE = 2'd0, CE_CID = 2'd1, CE_HID = 2'd2, CE_RID = 2'd3} ce_type_e;
  typedef struct packed {
    ce_type_e         t;
    logic [10:0]      rsv;
    logic [CNT_W-1:0] val;
    logic [ID_W-1:0]  id;
  } ctx_entry_t;

  // Event counter indices.
  localparam int unsigned EV_IDS = 0, EV_CID_FWD = 1, EV_CID_DUP = 2, EV_RIDS = 3,
                          EV_HDR_DROP = 4, EV_MATCH = 5, EV_ALERT = 6, EV_CTX_SW = 7,
                          EV_CTX_OVF = 8, EV_FREQ = 9, EV_FREQ_SKIP = 10;

endpackage
