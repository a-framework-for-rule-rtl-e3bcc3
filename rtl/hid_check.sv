// hid_check: stage 5, header ID check.
//
// A bit-vector with one bit per header ID records which header rules matched
// the current flow. HIDs arriving from stage 1 set their bit; each RID token
// from stage 4 tests the bit of its rule's HID and is dropped when it is
// clear, so only rules whose header matched reach the count check. HIDs at or
// above HO_BASE form the header-only range: such a HID is the ID of a rule
// with no content, and its arrival is declared a match at once (a TK_DIRECT
// token carrying RID = HID). With hdr_check_en low every RID passes, which
// allows testing without a header processing module. A HID set in the same
// cycle as a test of the same HID counts as set. A query port (f_id / f_set)
// gives the frequent-CID unit the bit of any HID, combinationally; f_set is
// also high when the check is disabled. The second port (m_*) lets
// the context storage save, clear and restore the bits. The bit-vector, the
// header-only range and the enable follow the document; the size of the range,
// RID = HID for header-only rules, the combinational read and the all-clear
// start are this design's choices.
//
// Timing: one token per cycle, one cycle latency. A header-only HID needs the
// output register, so it takes priority and stalls stage 4 for that cycle.
module hid_check
  import rp_pkg::*;
#(
  parameter int unsigned NUM_HID = 32768,
  parameter int unsigned HO_BASE = 32512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       hdr_check_en,
  // HIDs from stage 1
  input  logic                       h_valid,
  input  logic [ID_W-1:0]            h_id,
  output logic                       h_ready,
  // RID tokens from stage 4
  input  logic                       in_valid,
  input  tok_t                       in_tok,
  output logic                       in_ready,
  output logic                       out_valid,
  output tok_t                       out_tok,
  input  logic                       out_ready,
  // maintenance port
  input  logic                       m_we,
  input  logic [$clog2(NUM_HID)-1:0] m_addr,
  input  logic                       m_wdata,
  output logic                       m_rdata,
  // read port for the frequent-CID unit
  input  logic [ID_W-1:0]            f_id,
  output logic                       f_set,
  // newly set HID recorded for the flow's context
  output logic                       rec_valid,
  output logic [ID_W-1:0]            rec_id,
  output logic                       ev_drop,
  output logic                       idle
);
  localparam int unsigned AW = $clog2(NUM_HID);

  logic          bv [NUM_HID];
  logic          slot_free, ho, h_fire, set, fire, pass;
  logic [AW-1:0] hidx, qidx;

  initial for (int i = 0; i < NUM_HID; i++) bv[i] = 1'b0;

  assign slot_free = !out_valid || out_ready;
  assign ho        = (32'(h_id) >= HO_BASE);
  assign h_ready   = ho ? slot_free : 1'b1;
  assign h_fire    = h_valid && h_ready;
  assign hidx      = h_id[AW-1:0];
  assign set       = h_fire && !ho;
  assign in_ready  = slot_free && !(h_valid && ho);
  assign fire      = in_valid && in_ready;
  assign qidx      = in_tok.hid[AW-1:0];
  assign pass      = !hdr_check_en || bv[qidx] || (set && hidx == qidx);
  assign m_rdata   = bv[m_addr];
  assign f_set     = !hdr_check_en || bv[f_id[AW-1:0]] || (set && hidx == f_id[AW-1:0]);

  assign rec_valid = set && !bv[hidx];
  assign rec_id    = h_id;
  assign ev_drop   = fire && in_tok.kind == TK_ID && !pass;
  assign idle      = !out_valid;

  always_ff @(posedge clk) begin
    if (m_we) bv[m_addr] <= m_wdata;
    if (set)  bv[hidx]   <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tok   <= '0;
    end else if (slot_free) begin
      if (h_fire && ho) begin
        out_valid    <= 1'b1;
        out_tok      <= '0;
        out_tok.kind <= TK_DIRECT;
        out_tok.id   <= h_id;
      end else begin
        out_valid <= fire && (in_tok.kind != TK_ID || pass);
        out_tok   <= in_tok;
      end
    end
  end
endmodule
