// hid_mapping: stage 4, header ID mapping.
//
// SRAM bank B is indexed directly by the rule ID. The word at address RID is
// {valid, HID, CID list valid, CID list head}: the one header rule of the rule
// and a pointer to the list of the rule's CIDs (used by stage 6 to clear them
// after a match). The stage reads that word for each RID token and hands on
// the RID with its HID and list pointer; a RID whose word is not valid (rule
// not programmed) is dropped. End-of-message tokens pass without a read.
//
// Timing: one token per cycle; the SRAM answers one cycle after the address,
// which the stage keeps presenting while it is stalled. gnt low (port taken by
// the control FSM or by the clear walk of stage 6) repeats the read. The
// RID-to-HID lookup is the document's; storing the CID list head in the same
// word is this design's choice.
module hid_mapping
  import rp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  tok_t               in_tok,
  output logic               in_ready,
  output logic               out_valid,
  output tok_t               out_tok,
  input  logic               out_ready,
  output logic               sb_en,
  output logic [SRAM_AW-1:0] sb_addr,
  input  logic [SRAM_DW-1:0] sb_rdata,
  input  logic               sb_gnt,
  output logic               idle
);
  logic  busy, data_ok, drop, fire;
  tok_t  tok;
  node_t w;

  assign w = node_t'(sb_rdata[$bits(node_t)-1:0]);

  always_comb begin
    out_valid = 1'b0;
    out_tok   = tok;
    drop      = 1'b0;
    if (busy && tok.kind != TK_ID) begin
      out_valid = 1'b1;
    end else if (busy && data_ok) begin
      out_valid      = w.valid;
      drop           = !w.valid;
      out_tok.hid    = w.id;
      out_tok.pvalid = w.nvalid;
      out_tok.ptr    = w.next;
    end
  end

  assign in_ready = !busy || (out_valid && out_ready) || drop;
  assign fire     = in_valid && in_ready;
  assign sb_addr  = fire ? SRAM_AW'(in_tok.id) : SRAM_AW'(tok.id);
  assign sb_en    = fire ? (in_tok.kind == TK_ID) : (busy && !in_ready && tok.kind == TK_ID);
  assign idle     = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      tok     <= '0;
      data_ok <= 1'b0;
    end else begin
      data_ok <= sb_en && sb_gnt;
      if (fire) begin
        busy <= 1'b1;
        tok  <= in_tok;
      end else if (in_ready) begin
        busy <= 1'b0;
      end
    end
  end
endmodule
