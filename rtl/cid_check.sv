// cid_check: stage 2, content ID check.
//
// A bit-vector with one bit per content ID records which signatures were
// already seen in the current flow. A CID token whose bit is clear sets the
// bit and moves on to stage 3; a CID whose bit is already set is dropped, so
// only the first occurrence of a signature in a flow reaches the rule lookup.
// End-of-message tokens pass unchanged. The bit-vector has a second port (m_*)
// through which stage 6 clears the CIDs of a matched rule and the context
// storage saves, clears and restores the flow's bits; a set from the pipeline
// wins over a write on that port in the same cycle. A second bit per CID
// ("listed") remembers that the CID is already in the flow's context list, so
// a CID set again after a clear by stage 6 is not reported twice; only
// context writes (m_list high) change it. The bit-vector follows the
// document; it is read combinationally here (one cycle per token, no bypass
// logic needed) and starts all-clear, both this design's choices.
//
// Timing: one token per cycle, one cycle latency, valid/ready on both sides.
module cid_check
  import rp_pkg::*;
#(
  parameter int unsigned NUM_CID = 32768
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  tok_t                       in_tok,
  output logic                       in_ready,
  output logic                       out_valid,
  output tok_t                       out_tok,
  input  logic                       out_ready,
  // maintenance port
  input  logic                       m_we,
  input  logic [$clog2(NUM_CID)-1:0] m_addr,
  input  logic                       m_wdata,
  input  logic                       m_list,   // write also sets/clears the listed bit
  output logic                       m_rdata,
  // first occurrence recorded for the flow's context
  output logic                       rec_valid,
  output logic [ID_W-1:0]            rec_id,
  output logic                       ev_fwd,
  output logic                       ev_dup,
  output logic                       idle
);
  localparam int unsigned AW = $clog2(NUM_CID);

  logic          bv [NUM_CID];
  logic          listed [NUM_CID];
  logic          fire, is_id, seen, set;
  logic [AW-1:0] idx;

  initial for (int i = 0; i < NUM_CID; i++) begin
    bv[i]     = 1'b0;
    listed[i] = 1'b0;
  end

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign is_id    = (in_tok.kind == TK_ID);
  assign idx      = in_tok.id[AW-1:0];
  assign seen     = bv[idx];
  assign set      = fire && is_id && !seen;
  assign m_rdata  = bv[m_addr];

  assign rec_valid = set && !listed[idx];
  assign rec_id    = in_tok.id;
  assign ev_fwd    = set;
  assign ev_dup    = fire && is_id && seen;
  assign idle      = !out_valid;

  always_ff @(posedge clk) begin
    if (m_we) bv[m_addr] <= m_wdata;
    if (m_we && m_list) listed[m_addr] <= m_wdata;
    if (set) begin
      bv[idx]     <= 1'b1;
      listed[idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tok   <= '0;
    end else if (in_ready) begin
      out_valid <= fire && (!is_id || !seen);
      out_tok   <= in_tok;
    end
  end
endmodule
