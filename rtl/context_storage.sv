// context_storage: per-flow context of stages 2, 5 and 6.
//
// Packets of many TCP flows are interleaved, but the bit-vectors of stages 2
// and 5 and the current counts of stage 6 belong to one flow. Copying the
// full vectors per flow would be far too slow, so the stages report every
// entry they set for the current flow (a CID, a HID, a rule whose count left
// zero) and this block keeps that list of at most ENTRIES addresses. On a
// flow change (sw_req from stage 1 while the pipeline is empty):
//   save    for each listed address, read the current value (bit or count),
//           clear it in its memory, and pack {type, value, id} entries four to
//           a 128-bit word; the words go to off-chip memory at {flow, word},
//           ending with the word that holds the first empty entry (at most
//           CTX_WORDS = 32 words, 512 bytes per flow);
//   restore read the new flow's words back in order and write each entry with
//           a non-zero value into its memory, rebuilding the list, until the
//           first empty entry.
// Flow 0 (stateless traffic) is never saved or restored: its entries are only
// cleared. Addresses reported while the list is full are not kept (ev_ovf).
// Off-chip memory must read as zero for a flow never saved. Storing only the
// addresses of set entries, sending them off-chip and 512 bytes in 32 words per
// flow follow the document; the entry format, the saving of stage 6 counts
// and the one-entry-per-cycle save and restore are this design's choices.
//
// Interface timing: sd_req with sd_we writes sd_wdata in the cycle sd_gnt is
// high; a read request is granted likewise and its data returns later with
// sd_rvalid (one outstanding read). sw_done is a one-cycle pulse.
module context_storage
  import rp_pkg::*;
#(
  parameter int unsigned NUM_ID  = 32768,
  parameter int unsigned ENTRIES = 4 * CTX_WORDS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // entries set by the pipeline
  input  logic                      rec2_valid,
  input  logic [ID_W-1:0]           rec2_id,
  input  logic                      rec5_valid,
  input  logic [ID_W-1:0]           rec5_id,
  input  logic                      rec6_valid,
  input  logic [ID_W-1:0]           rec6_id,
  // flow switch
  input  logic                      sw_req,
  input  logic                      old_valid,
  input  logic [FLOW_W-1:0]         old_flow,
  input  logic [FLOW_W-1:0]         new_flow,
  output logic                      sw_done,
  output logic                      busy,
  // memory ports: stage 2 bits, stage 5 bits, stage 6 counts
  output logic                      m2_we,
  output logic [$clog2(NUM_ID)-1:0] m2_addr,
  output logic                      m2_wdata,
  input  logic                      m2_rdata,
  output logic                      m5_we,
  output logic [$clog2(NUM_ID)-1:0] m5_addr,
  output logic                      m5_wdata,
  input  logic                      m5_rdata,
  output logic                      m6_we,
  output logic [$clog2(NUM_ID)-1:0] m6_addr,
  output logic [CNT_W-1:0]          m6_wdata,
  input  logic [CNT_W-1:0]          m6_rdata,
  // off-chip context memory
  output logic                      sd_req,
  output logic                      sd_we,
  output logic [SD_AW-1:0]          sd_addr,
  output logic [SD_DW-1:0]          sd_wdata,
  input  logic                      sd_gnt,
  input  logic                      sd_rvalid,
  input  logic [SD_DW-1:0]          sd_rdata,
  output logic                      ev_sw,
  output logic                      ev_ovf
);
  localparam int unsigned AW  = $clog2(NUM_ID);
  localparam int unsigned NW  = $clog2(ENTRIES + 1);
  localparam int unsigned WPW = SD_DW / 32;           // entries per word
  localparam int unsigned WW  = $clog2(CTX_WORDS);

  typedef struct packed {
    ce_type_e        t;
    logic [ID_W-1:0] id;
  } lent_t;

  typedef enum logic [2:0] {C_IDLE, C_SAVE, C_SAVE_WR, C_CLEAR, C_RD_REQ, C_RD_WAIT, C_APPLY, C_DONE}
    cstate_e;

  cstate_e           state;
  lent_t             list [ENTRIES];
  logic [NW-1:0]     n;
  logic [NW-1:0]     i;          // entry index while saving / clearing
  logic [1:0]        slot;       // entry within the word
  logic [WW-1:0]     w;          // word index
  logic [SD_DW-1:0]  word;
  logic [FLOW_W-1:0] sflow, lflow;
  lent_t             cur;
  ctx_entry_t        ent_out, ent_in;
  logic [CNT_W-1:0]  val;

  // List length after this cycle's reports.
  logic [NW-1:0] n_rec;
  logic          rec_lost;
  always_comb begin
    int unsigned k;
    k = 32'(n) + 32'(rec2_valid) + 32'(rec5_valid) + 32'(rec6_valid);
    rec_lost = (k > ENTRIES);
    n_rec    = rec_lost ? NW'(ENTRIES) : NW'(k);
  end

  assign busy    = (state != C_IDLE);
  assign sw_done = (state == C_DONE);
  assign ev_sw   = sw_done;

  // Entry under the save / clear cursor.
  always_comb begin
    cur = '0;
    if (32'(i) < 32'(n)) cur = list[i[$clog2(ENTRIES)-1:0]];
  end
  assign ent_in = ctx_entry_t'(word[32*slot +: 32]);

  always_comb begin
    unique case (cur.t)
      CE_CID:  val = {{(CNT_W-1){1'b0}}, m2_rdata};
      CE_HID:  val = {{(CNT_W-1){1'b0}}, m5_rdata};
      CE_RID:  val = m6_rdata;
      default: val = '0;
    endcase
    ent_out     = '0;
    ent_out.t   = cur.t;
    ent_out.val = val;
    ent_out.id  = cur.id;
  end

  // Memory ports: clear while saving/clearing, write while restoring.
  always_comb begin
    m2_we = 1'b0; m5_we = 1'b0; m6_we = 1'b0;
    m2_addr = cur.id[AW-1:0]; m5_addr = cur.id[AW-1:0]; m6_addr = cur.id[AW-1:0];
    m2_wdata = 1'b0; m5_wdata = 1'b0; m6_wdata = '0;
    if (state == C_SAVE || state == C_CLEAR) begin
      m2_we = (cur.t == CE_CID);
      m5_we = (cur.t == CE_HID);
      m6_we = (cur.t == CE_RID);
    end else if (state == C_APPLY) begin
      m2_addr = ent_in.id[AW-1:0]; m5_addr = ent_in.id[AW-1:0]; m6_addr = ent_in.id[AW-1:0];
      m2_wdata = ent_in.val[0];    m5_wdata = ent_in.val[0];    m6_wdata = ent_in.val;
      m2_we = (ent_in.t == CE_CID) && (ent_in.val != '0);
      m5_we = (ent_in.t == CE_HID) && (ent_in.val != '0);
      m6_we = (ent_in.t == CE_RID) && (ent_in.val != '0);
    end
  end

  assign sd_req   = (state == C_SAVE_WR) || (state == C_RD_REQ);
  assign sd_we    = (state == C_SAVE_WR);
  assign sd_addr  = (state == C_SAVE_WR) ? {sflow, w} : {lflow, w};
  assign sd_wdata = word;

  always_ff @(posedge clk) begin
    if (state == C_IDLE) begin : record
      int unsigned k;
      k = 32'(n);
      if (rec2_valid && k < ENTRIES) begin list[k] <= '{CE_CID, rec2_id}; k++; end
      if (rec5_valid && k < ENTRIES) begin list[k] <= '{CE_HID, rec5_id}; k++; end
      if (rec6_valid && k < ENTRIES) begin list[k] <= '{CE_RID, rec6_id}; k++; end
    end else if (state == C_APPLY && ent_in.t != CE_NONE && ent_in.val != '0 && 32'(n) < ENTRIES) begin
      list[n[$clog2(ENTRIES)-1:0]] <= '{ent_in.t, ent_in.id};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      n     <= '0;
      i     <= '0;
      slot  <= '0;
      w     <= '0;
      word  <= '0;
      sflow <= '0;
      lflow <= '0;
      ev_ovf <= 1'b0;
    end else begin
      ev_ovf <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (sw_req) begin
            sflow <= old_flow;
            lflow <= new_flow;
            i     <= '0;
            slot  <= '0;
            w     <= '0;
            word  <= '0;
            if (old_valid && old_flow != '0) state <= C_SAVE;
            else                             state <= C_CLEAR;
          end else begin
            n      <= n_rec;
            ev_ovf <= rec_lost;
          end
        end
        C_SAVE: begin
          word[32*slot +: 32] <= ent_out;
          i    <= i + 1'b1;
          slot <= slot + 1'b1;
          if (slot == 2'(WPW - 1)) state <= C_SAVE_WR;
        end
        C_SAVE_WR: if (sd_gnt) begin
          // stop after the word holding the first empty entry, or the last word
          if (32'(i) > 32'(n) || w == WW'(CTX_WORDS - 1)) begin
            n     <= '0;
            state <= C_RD_REQ;
            w     <= '0;
            if (lflow == '0) state <= C_DONE;
          end else begin
            w     <= w + 1'b1;
            state <= C_SAVE;
          end
        end
        C_CLEAR: begin
          if (32'(i) >= 32'(n)) begin
            n     <= '0;
            w     <= '0;
            state <= (lflow == '0) ? C_DONE : C_RD_REQ;
          end else begin
            i <= i + 1'b1;
          end
        end
        C_RD_REQ:  if (sd_gnt) state <= C_RD_WAIT;
        C_RD_WAIT: if (sd_rvalid) begin
          word  <= sd_rdata;
          slot  <= '0;
          state <= C_APPLY;
        end
        C_APPLY: begin
          if (ent_in.t == CE_NONE) begin
            state <= C_DONE;
          end else begin
            if (ent_in.val != '0 && 32'(n) < ENTRIES) n <= n + 1'b1;
            slot <= slot + 1'b1;
            if (slot == 2'(WPW - 1)) begin
              if (w == WW'(CTX_WORDS - 1)) state <= C_DONE;
              else begin
                w     <= w + 1'b1;
                state <= C_RD_REQ;
              end
            end
          end
        end
        C_DONE: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
