// freq_cid: frequent-signature unit between stage 2 and stage 3.
//
// A few signatures appear in very many rules (one common four-byte pattern
// in over a hundred). Walking such a CID's list in SRAM would push every one of
// those rules through stages 3 to 6, although only the few whose header rule
// matched the flow can ever count. This unit keeps up to NUM_FREQ such CIDs
// on chip. Each has its rules grouped by header rule. For each header rule the
// unit checks the header bit once and passes on only the RIDs of groups whose
// header matched.
//
// Programming (from the control FSM):
//   cam_we: entry cfg_addr = {valid (bit 31), CID (bits 30:16), start (15:0)}.
//   tab_we: table word cfg_addr = {last (bit 24), group (bit 23),
//           n (bits 22:15), id (bits 14:0)}.
// A CID's sequence starts at its entry's start. It is a list of groups, each
// a group word (id = HID, n = number of RID words that follow, last = last
// group) followed by n RID words (id = RID, last = the very last word).
//
// Operation: a CID token that hits an entry is taken and replaced by the
// RIDs of its matching groups, handed on as TK_RID tokens. Stage 3 passes
// them on as RIDs without a list walk, and stages 4 to 6 treat them like any
// other RID. Every other token is passed on unchanged with one cycle of
// latency. The header bit is read through hq_id / hq_set, a second read port
// on the stage-5 bit-vector; hq_set is also high when the header check is
// disabled.
//
// Timing: one cycle per group word (skipped groups cost one cycle however many
// RIDs they hold), one cycle per RID passed on while out_ready is high. No new
// token is taken during a sequence. The idea (route frequent CIDs to a unit
// that checks their headers and inserts only RIDs with matching headers)
// follows the document. The table layout, grouping by header, sizes, and
// placement in front of stage 3 are this design's choices. The unit relies
// on the packet's header IDs arriving before its content IDs, as the rest of
// the pipeline does.
module freq_cid
  import rp_pkg::*;
#(
  parameter int unsigned NUM_FREQ  = 18,
  parameter int unsigned TAB_DEPTH = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  tok_t               in_tok,
  output logic               in_ready,
  output logic               out_valid,
  output tok_t               out_tok,
  input  logic               out_ready,
  // programming
  input  logic               cam_we,
  input  logic               tab_we,
  input  logic [SRAM_AW-1:0] cfg_addr,
  input  logic [SRAM_DW-1:0] cfg_data,
  // header bit of the current flow
  output logic [ID_W-1:0]    hq_id,
  input  logic               hq_set,
  output logic               ev_freq,   // a frequent CID was taken
  output logic               ev_skip,   // a group was skipped, header not matched
  output logic               idle
);
  localparam int unsigned TW = $clog2(TAB_DEPTH);
  localparam int unsigned FW = (NUM_FREQ > 1) ? $clog2(NUM_FREQ) : 1;

  typedef struct packed {
    logic            last;
    logic            grp;
    logic [7:0]      n;
    logic [ID_W-1:0] id;
  } fword_t;

  logic            cam_v     [NUM_FREQ];
  logic [ID_W-1:0] cam_cid   [NUM_FREQ];
  logic [TW-1:0]   cam_start [NUM_FREQ];
  fword_t          tab [TAB_DEPTH];

  logic          busy, hit, fire, slot_free;
  logic [TW-1:0] p, hit_start;
  fword_t        w;

  initial for (int i = 0; i < TAB_DEPTH; i++) tab[i] = '0;

  always_comb begin
    hit       = 1'b0;
    hit_start = '0;
    for (int k = 0; k < NUM_FREQ; k++)
      if (cam_v[k] && cam_cid[k] == in_tok.id && in_tok.kind == TK_ID) begin
        hit       = 1'b1;
        hit_start = cam_start[k];
      end
  end

  assign slot_free = !out_valid || out_ready;
  assign in_ready  = !busy && (hit || slot_free);
  assign fire      = in_valid && in_ready;
  assign w         = tab[p];
  assign hq_id     = w.id;
  assign ev_freq   = fire && hit;
  assign ev_skip   = busy && w.grp && !hq_set;
  assign idle      = !busy && !out_valid;

  always_ff @(posedge clk) begin
    if (tab_we) tab[cfg_addr[TW-1:0]] <= fword_t'(cfg_data[$bits(fword_t)-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_FREQ; k++) begin
        cam_v[k]     <= 1'b0;
        cam_cid[k]   <= '0;
        cam_start[k] <= '0;
      end
    end else if (cam_we && cfg_addr < SRAM_AW'(NUM_FREQ)) begin
      cam_v[cfg_addr[FW-1:0]]     <= cfg_data[31];
      cam_cid[cfg_addr[FW-1:0]]   <= cfg_data[30:16];
      cam_start[cfg_addr[FW-1:0]] <= cfg_data[TW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      p         <= '0;
      out_valid <= 1'b0;
      out_tok   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire && hit) begin
        busy <= 1'b1;
        p    <= hit_start;
      end else if (fire) begin
        out_valid <= 1'b1;
        out_tok   <= in_tok;
      end
      if (busy) begin
        if (w.grp) begin
          if (hq_set) begin
            p <= p + 1'b1;
            if (w.last && w.n == '0) busy <= 1'b0;
          end else begin
            p <= p + 1'b1 + TW'(w.n);
            if (w.last) busy <= 1'b0;
          end
        end else if (slot_free) begin
          out_valid    <= 1'b1;
          out_tok      <= '0;
          out_tok.kind <= TK_RID;
          out_tok.id   <= w.id;
          p            <= p + 1'b1;
          if (w.last) busy <= 1'b0;
        end
      end
    end
  end
endmodule
