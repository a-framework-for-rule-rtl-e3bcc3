// count_check: stage 6, signature count check.
//
// Two block RAMs are indexed by the rule ID: the required count (the number of
// signatures the rule needs, written by software) and the current count of
// the flow. A RID token arrives here only for the first occurrence of one of
// the rule's signatures with the rule's header matched, so the stage adds one
// to the current count and compares it with the required count. On equality
// the rule matches: its RID goes to stage 7, its current count returns to zero
// and a clear walk starts that follows the rule's CID list in SRAM bank B and
// clears each of those CIDs in the stage 2 bit-vector (clr_*), so the rule
// can match again. Header-only matches (TK_DIRECT) and end-of-message tokens
// pass straight on. A rule whose current count leaves zero is reported
// (rec_*) for the flow's context once; a "listed" bit per rule, changed only
// by context writes, keeps a rule that fires and starts again from being
// reported twice. Counts are 4 bits: rules of up to 15 signatures. The
// m_* port gives the context storage access to the current counts, the q_*
// port gives the control FSM access to the required counts. The counting and
// clearing follow the document; the CID list in bank B is this design's
// choice, as are the combinational reads and the all-zero start.
//
// Timing: one token per cycle, one cycle latency. During a clear walk the
// stage takes no tokens; the walk reads one list node per cycle (SRAM data one
// cycle after the address) and clears one CID per node.
module count_check
  import rp_pkg::*;
#(
  parameter int unsigned NUM_RULE = 32768
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  tok_t                        in_tok,
  output logic                        in_ready,
  output logic                        out_valid,
  output tok_t                        out_tok,
  input  logic                        out_ready,
  // clear walk: SRAM bank B and the stage 2 bit-vector
  output logic                        sb_en,
  output logic [SRAM_AW-1:0]          sb_addr,
  input  logic [SRAM_DW-1:0]          sb_rdata,
  input  logic                        sb_gnt,
  output logic                        clr_valid,
  output logic [ID_W-1:0]             clr_cid,
  // current counts (context storage)
  input  logic                        m_we,
  input  logic [$clog2(NUM_RULE)-1:0] m_addr,
  input  logic [CNT_W-1:0]            m_wdata,
  output logic [CNT_W-1:0]            m_rdata,
  // required counts (control)
  input  logic                        q_we,
  input  logic [$clog2(NUM_RULE)-1:0] q_addr,
  input  logic [CNT_W-1:0]            q_wdata,
  output logic [CNT_W-1:0]            q_rdata,
  output logic                        rec_valid,
  output logic [ID_W-1:0]             rec_id,
  output logic                        ev_match,
  output logic                        idle
);
  localparam int unsigned AW = $clog2(NUM_RULE);

  logic [CNT_W-1:0]   req_cnt [NUM_RULE];
  logic [CNT_W-1:0]   cur_cnt [NUM_RULE];
  logic               listed [NUM_RULE];
  logic               fire, is_id, match;
  logic [AW-1:0]      ridx;
  logic [CNT_W-1:0]   inc;
  logic               walk, wdata_ok;
  logic [SRAM_AW-1:0] walk_ptr;
  node_t              node;

  initial for (int i = 0; i < NUM_RULE; i++) begin
    req_cnt[i] = '0;
    cur_cnt[i] = '0;
    listed[i]  = 1'b0;
  end

  assign in_ready = (!out_valid || out_ready) && !walk;
  assign fire     = in_valid && in_ready;
  assign is_id    = (in_tok.kind == TK_ID);
  assign ridx     = in_tok.id[AW-1:0];
  assign inc      = cur_cnt[ridx] + 1'b1;
  assign match    = fire && is_id && (inc == req_cnt[ridx]);
  assign m_rdata  = cur_cnt[m_addr];
  assign q_rdata  = req_cnt[q_addr];

  assign rec_valid = fire && is_id && !match && !listed[ridx];
  assign rec_id    = in_tok.id;
  assign ev_match  = match || (fire && in_tok.kind == TK_DIRECT);
  assign idle      = !out_valid && !walk;

  // Clear walk over the matched rule's CID list.
  assign node      = node_t'(sb_rdata[$bits(node_t)-1:0]);
  assign clr_valid = walk && wdata_ok && node.valid;
  assign clr_cid   = node.id;
  assign sb_en     = walk && !(wdata_ok && !node.nvalid);
  assign sb_addr   = (wdata_ok && node.nvalid) ? node.next : walk_ptr;

  always_ff @(posedge clk) begin
    if (m_we) begin
      cur_cnt[m_addr] <= m_wdata;
      listed[m_addr]  <= (m_wdata != '0);
    end
    if (q_we) req_cnt[q_addr] <= q_wdata;
    if (fire && is_id) cur_cnt[ridx] <= match ? '0 : inc;
    if (rec_valid)     listed[ridx]  <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tok   <= '0;
      walk      <= 1'b0;
      wdata_ok  <= 1'b0;
      walk_ptr  <= '0;
    end else begin
      if (!out_valid || out_ready) begin
        out_valid <= fire && (!is_id || match);
        out_tok   <= in_tok;
        if (fire && in_tok.kind == TK_DIRECT) out_tok.kind <= TK_ID;
      end
      wdata_ok <= sb_en && sb_gnt;
      if (match && in_tok.pvalid) begin
        walk     <= 1'b1;
        walk_ptr <= in_tok.ptr;
      end else if (walk && wdata_ok) begin
        if (node.nvalid) walk_ptr <= node.next;
        else             walk     <= 1'b0;
      end
    end
  end
endmodule
