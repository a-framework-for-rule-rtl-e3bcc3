// rid_retrieval: stage 3, rule ID retrieval.
//
// A reverse index in SRAM bank A maps every content ID to the rules that use
// it. The word at address CID is the first node of a linked list; each node
// holds {valid, RID, next valid, next pointer} (rp_pkg::node_t). Software
// builds the lists and manages the free nodes. For each CID token the stage
// reads the head node and walks the list, handing on one RID per node; a CID
// whose head is not valid belongs to no rule and is dropped. End-of-message
// tokens pass through without a read, and so do TK_RID tokens from the
// frequent-CID unit, which already carry a RID: they leave as TK_ID tokens.
//
// Timing: the SRAM returns the word one cycle after the address. The stage
// keeps presenting the address of the node it holds while it is stalled, so
// the read data stays valid; after the first read it emits one RID per cycle
// while out_ready is high. gnt low means the port was taken by the control
// FSM; the read is then repeated. The list walk follows the document; the node
// layout and the one-cycle SRAM model are this design's choices.
module rid_retrieval
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
  // SRAM bank A read port
  output logic               sa_en,
  output logic [SRAM_AW-1:0] sa_addr,
  input  logic [SRAM_DW-1:0] sa_rdata,
  input  logic               sa_gnt,
  output logic               ev_rid,
  output logic               idle
);
  logic               busy, eom, data_ok;
  logic [SRAM_AW-1:0] cur_addr;
  node_t              node;
  logic               fire, advance, finish;

  tok_kind_e pkind;   // kind of a token passed without a walk

  assign node = node_t'(sa_rdata[$bits(node_t)-1:0]);

  always_comb begin
    out_valid = 1'b0;
    out_tok   = '0;
    if (busy && eom) begin
      out_valid    = 1'b1;
      out_tok.kind = (pkind == TK_RID) ? TK_ID : TK_EOM;
      out_tok.id   = cur_addr[ID_W-1:0];
    end else if (busy && data_ok && node.valid) begin
      out_valid    = 1'b1;
      out_tok.kind = TK_ID;
      out_tok.id   = node.id;
    end
  end

  // advance: move to the next node; finish: the current CID is done.
  assign advance  = busy && !eom && data_ok && node.valid && node.nvalid && out_ready;
  assign finish   = busy && (eom ? out_ready
                                 : (data_ok && (!node.valid || (out_ready && !node.nvalid))));
  assign in_ready = !busy || finish;
  assign fire     = in_valid && in_ready;

  always_comb begin
    sa_en   = 1'b0;
    sa_addr = cur_addr;
    if (fire && in_tok.kind == TK_ID) begin
      sa_en   = 1'b1;
      sa_addr = SRAM_AW'(in_tok.id);
    end else if (advance) begin
      sa_en   = 1'b1;
      sa_addr = node.next;
    end else if (busy && !eom && !finish) begin
      sa_en   = 1'b1;
    end
  end

  assign ev_rid = out_valid && out_ready && out_tok.kind == TK_ID;
  assign idle   = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      eom      <= 1'b0;
      data_ok  <= 1'b0;
      cur_addr <= '0;
      pkind    <= TK_EOM;
    end else begin
      data_ok <= sa_en && sa_gnt;
      if (fire) begin
        busy     <= 1'b1;
        eom      <= (in_tok.kind != TK_ID);
        pkind    <= in_tok.kind;
        cur_addr <= SRAM_AW'(in_tok.id);
      end else if (finish) begin
        busy <= 1'b0;
      end else if (advance) begin
        cur_addr <= node.next;
      end
    end
  end
endmodule
