// rule_processor: top of the seven-stage rule processor.
//
// Rules have the form  <action> H_ID and C1_ID and ... and Cn_ID : a rule
// matches in a flow when its header rule matched and each of its n signatures
// (0..15) was seen. Header and content scanning modules report matching IDs in
// messages on the ID interface; software programs the rules through the
// control interface; matched rules leave on the alert interface. All three are
// wrapper buses (comm_wrapper). The pipeline:
//   1 input       ID FIFO and parser (id_input), control FSM (ctrl_fsm)
//   2 CID check   first occurrence of a signature in the flow (cid_check)
//     frequent    frequent CIDs expanded on chip, header checked (freq_cid)
//   3 RID lookup  CID -> list of rules, SRAM bank A (rid_retrieval)
//   4 HID mapping RID -> header rule, SRAM bank B (hid_mapping)
//   5 HID check   header rule matched in the flow? (hid_check)
//   6 count check enough signatures seen? (count_check)
//   7 alert       RIDs of a packet bundled into one message (alert_gen)
// CIDs enter at stage 2, HIDs go from stage 1 straight to stage 5. The state
// of stages 2, 5 and 6 belongs to one flow; context_storage swaps it to and
// from off-chip memory when the flow changes.
//
// External memories: the two SRAM banks answer a read one cycle after the
// address (s*_en high, s*_we low) and write when s*_we is high; the context
// memory port is described in context_storage. The SRAM banks are shared:
// the control FSM has priority, then (bank B) the clear walk of stage 6, then
// the pipeline. Event counters (rp_pkg EV_*) count IDs received, CIDs handed
// on and dropped as repeats, RIDs retrieved, RIDs dropped by the header check,
// rule matches, alerts, context switches, lost context entries, frequent CIDs
// taken and header groups skipped by freq_cid; software
// reads them with OP_RD_EVT. The stage structure follows the document; memory
// sizes of the ID spaces follow its 32,768 rules, and the external memory
// timing, the message layouts and the sharing rules are this design's choices.
//
// Known limit of the pipelining: the CIDs of a matched rule are cleared in
// stage 2 a few cycles after the match, while later CIDs of the same message
// keep flowing. A CID that was already set in the flow, belongs to a rule that
// has just fired and arrives again within those few cycles (later in the same
// message, or at the start of the next message of the same flow) can
// therefore still be taken as a repeat. A change of flow waits for the clear.
module rule_processor
  import rp_pkg::*;
#(
  parameter int unsigned NUM_ID     = 32768,  // CIDs, HIDs and RIDs
  parameter int unsigned HO_BASE    = 32512,  // first header-only HID
  parameter int unsigned FIFO_DEPTH = 512,    // stage 1 ID FIFO, words
  parameter int unsigned WRAP_DEPTH = 16,     // wrapper FIFOs, words
  parameter int unsigned MAX_RIDS   = 256,    // RIDs per alert message
  parameter int unsigned NUM_FREQ   = 18,     // frequent CIDs handled on chip
  parameter int unsigned FREQ_TAB   = 1024    // words of the frequent-CID table
) (
  input  logic               clk,
  input  logic               rst_n,
  // ID interface
  input  wbus_t              id_in,
  output logic               id_stop,
  // control interface
  input  wbus_t              ctl_in,
  output logic               ctl_stop,
  // alert interface
  output wbus_t              alert_out,
  input  logic               alert_stop,
  // SRAM bank A (CID -> RID lists)
  output logic               sa_en,
  output logic               sa_we,
  output logic [SRAM_AW-1:0] sa_addr,
  output logic [SRAM_DW-1:0] sa_wdata,
  input  logic [SRAM_DW-1:0] sa_rdata,
  // SRAM bank B (RID -> HID, rule CID lists)
  output logic               sb_en,
  output logic               sb_we,
  output logic [SRAM_AW-1:0] sb_addr,
  output logic [SRAM_DW-1:0] sb_wdata,
  input  logic [SRAM_DW-1:0] sb_rdata,
  // off-chip context memory
  output logic               sd_req,
  output logic               sd_we,
  output logic [SD_AW-1:0]   sd_addr,
  output logic [SD_DW-1:0]   sd_wdata,
  input  logic               sd_gnt,
  input  logic               sd_rvalid,
  input  logic [SD_DW-1:0]   sd_rdata
);
  localparam int unsigned AW = $clog2(NUM_ID);

  // ---------------------------------------------------------------- wrappers
  wbus_t id_w, ctl_w, alert_w;
  logic  id_w_stop, ctl_w_stop, alert_w_stop;

  comm_wrapper #(.DEPTH(WRAP_DEPTH)) u_wrap_id (
    .clk, .rst_n, .in_bus(id_in), .in_stop(id_stop), .out_bus(id_w), .out_stop(id_w_stop));
  comm_wrapper #(.DEPTH(WRAP_DEPTH)) u_wrap_ctl (
    .clk, .rst_n, .in_bus(ctl_in), .in_stop(ctl_stop), .out_bus(ctl_w), .out_stop(ctl_w_stop));
  comm_wrapper #(.DEPTH(WRAP_DEPTH)) u_wrap_alert (
    .clk, .rst_n, .in_bus(alert_w), .in_stop(alert_w_stop), .out_bus(alert_out), .out_stop(alert_stop));

  // ---------------------------------------------------------------- signals
  logic              s1_c_valid, s1_c_ready, s1_h_valid, s1_h_ready;
  tok_t              s1_c_tok;
  logic [ID_W-1:0]   s1_h_id;
  logic              s2_valid, s2_ready, s3_valid, s3_ready, s4_valid, s4_ready;
  logic              s5_valid, s5_ready, s6_valid, s6_ready;
  tok_t              s2_tok, s3_tok, s4_tok, s5_tok, s6_tok;
  logic              ctx_req, ctx_old_valid, ctx_done, ctx_busy;
  logic [FLOW_W-1:0] ctx_old_flow, ctx_new_flow, cur_flow;
  logic              hold, at_boundary, pipe_idle, stages_idle;
  logic              idle2, idle3, idle4, idle5, idle6, idle7, idle_fc;
  logic              fc_valid, fc_ready, fc_hq_set, c_fcam_we, c_ftab_we;
  tok_t              fc_tok;
  logic [ID_W-1:0]   fc_hq_id;
  logic              hdr_check_en;
  logic [NUM_EV-1:0] ev;
  logic [NUM_EV-1:0][31:0] ev_cnt;

  // control FSM memory access
  logic               c_sa_en, c_sa_we, c_sb_en, c_sb_we, c_q_we;
  logic [SRAM_AW-1:0] c_addr;
  logic [SRAM_DW-1:0] c_wdata;
  logic [AW-1:0]      c_q_addr;
  logic [CNT_W-1:0]   c_q_wdata, c_q_rdata;
  logic               resp_valid, resp_ready;
  logic [DATA_W-1:0]  resp_w0, resp_w1;

  // pipeline SRAM ports
  logic               p3_en, p4_en, p6_en;
  logic [SRAM_AW-1:0] p3_addr, p4_addr, p6_addr;

  // maintenance ports
  logic               rec2_v, rec5_v, rec6_v, clr_v;
  logic [ID_W-1:0]    rec2_id, rec5_id, rec6_id, clr_cid;
  logic               x2_we, x5_we, x6_we, m2_we, m2_wdata, m2_rdata, m5_rdata, x2_wdata, x5_wdata;
  logic [AW-1:0]      x2_addr, x5_addr, x6_addr, m2_addr;
  logic [CNT_W-1:0]   x6_wdata, m6_rdata;

  assign stages_idle = idle2 && idle_fc && idle3 && idle4 && idle5 && idle6 && idle7 && !ctx_busy;
  assign pipe_idle   = stages_idle && at_boundary;

  // ---------------------------------------------------------------- stage 1
  id_input #(.FIFO_DEPTH(FIFO_DEPTH)) u_s1 (
    .clk, .rst_n,
    .id_in(id_w), .id_stop(id_w_stop),
    .c_valid(s1_c_valid), .c_tok(s1_c_tok), .c_ready(s1_c_ready),
    .h_valid(s1_h_valid), .h_id(s1_h_id), .h_ready(s1_h_ready),
    .pipe_idle(stages_idle),
    .ctx_req, .ctx_old_valid, .ctx_old_flow, .ctx_new_flow, .ctx_done,
    .cur_flow, .hold, .at_boundary, .ev_id(ev[EV_IDS]));

  ctrl_fsm #(.NUM_RULE(NUM_ID)) u_ctrl (
    .clk, .rst_n,
    .c_in(ctl_w), .c_stop(ctl_w_stop),
    .hold, .idle(pipe_idle),
    .sa_en(c_sa_en), .sa_we(c_sa_we), .sb_en(c_sb_en), .sb_we(c_sb_we),
    .s_addr(c_addr), .s_wdata(c_wdata), .sa_rdata, .sb_rdata,
    .f_cam_we(c_fcam_we), .f_tab_we(c_ftab_we),
    .q_we(c_q_we), .q_addr(c_q_addr), .q_wdata(c_q_wdata), .q_rdata(c_q_rdata),
    .hdr_check_en, .ev_cnt,
    .resp_valid, .resp_w0, .resp_w1, .resp_ready);

  // ---------------------------------------------------------------- stage 2
  assign m2_we    = ctx_busy ? x2_we    : clr_v;
  assign m2_addr  = ctx_busy ? x2_addr  : clr_cid[AW-1:0];
  assign m2_wdata = ctx_busy ? x2_wdata : 1'b0;

  cid_check #(.NUM_CID(NUM_ID)) u_s2 (
    .clk, .rst_n,
    .in_valid(s1_c_valid), .in_tok(s1_c_tok), .in_ready(s1_c_ready),
    .out_valid(s2_valid), .out_tok(s2_tok), .out_ready(s2_ready),
    .m_we(m2_we), .m_addr(m2_addr), .m_wdata(m2_wdata), .m_list(ctx_busy), .m_rdata(m2_rdata),
    .rec_valid(rec2_v), .rec_id(rec2_id),
    .ev_fwd(ev[EV_CID_FWD]), .ev_dup(ev[EV_CID_DUP]), .idle(idle2));

  // ------------------------------------------- frequent CIDs, then stage 3
  freq_cid #(.NUM_FREQ(NUM_FREQ), .TAB_DEPTH(FREQ_TAB)) u_fc (
    .clk, .rst_n,
    .in_valid(s2_valid), .in_tok(s2_tok), .in_ready(s2_ready),
    .out_valid(fc_valid), .out_tok(fc_tok), .out_ready(fc_ready),
    .cam_we(c_fcam_we), .tab_we(c_ftab_we), .cfg_addr(c_addr), .cfg_data(c_wdata),
    .hq_id(fc_hq_id), .hq_set(fc_hq_set),
    .ev_freq(ev[EV_FREQ]), .ev_skip(ev[EV_FREQ_SKIP]), .idle(idle_fc));

  rid_retrieval u_s3 (
    .clk, .rst_n,
    .in_valid(fc_valid), .in_tok(fc_tok), .in_ready(fc_ready),
    .out_valid(s3_valid), .out_tok(s3_tok), .out_ready(s3_ready),
    .sa_en(p3_en), .sa_addr(p3_addr), .sa_rdata, .sa_gnt(!c_sa_en),
    .ev_rid(ev[EV_RIDS]), .idle(idle3));

  assign sa_en    = c_sa_en || p3_en;
  assign sa_we    = c_sa_en && c_sa_we;
  assign sa_addr  = c_sa_en ? c_addr : p3_addr;
  assign sa_wdata = c_wdata;

  // ---------------------------------------------------------------- stage 4
  hid_mapping u_s4 (
    .clk, .rst_n,
    .in_valid(s3_valid), .in_tok(s3_tok), .in_ready(s3_ready),
    .out_valid(s4_valid), .out_tok(s4_tok), .out_ready(s4_ready),
    .sb_en(p4_en), .sb_addr(p4_addr), .sb_rdata, .sb_gnt(!c_sb_en && !p6_en),
    .idle(idle4));

  assign sb_en    = c_sb_en || p6_en || p4_en;
  assign sb_we    = c_sb_en && c_sb_we;
  assign sb_addr  = c_sb_en ? c_addr : (p6_en ? p6_addr : p4_addr);
  assign sb_wdata = c_wdata;

  // ---------------------------------------------------------------- stage 5
  hid_check #(.NUM_HID(NUM_ID), .HO_BASE(HO_BASE)) u_s5 (
    .clk, .rst_n, .hdr_check_en,
    .h_valid(s1_h_valid), .h_id(s1_h_id), .h_ready(s1_h_ready),
    .in_valid(s4_valid), .in_tok(s4_tok), .in_ready(s4_ready),
    .out_valid(s5_valid), .out_tok(s5_tok), .out_ready(s5_ready),
    .m_we(x5_we), .m_addr(x5_addr), .m_wdata(x5_wdata), .m_rdata(m5_rdata),
    .f_id(fc_hq_id), .f_set(fc_hq_set),
    .rec_valid(rec5_v), .rec_id(rec5_id),
    .ev_drop(ev[EV_HDR_DROP]), .idle(idle5));

  // ---------------------------------------------------------------- stage 6
  count_check #(.NUM_RULE(NUM_ID)) u_s6 (
    .clk, .rst_n,
    .in_valid(s5_valid), .in_tok(s5_tok), .in_ready(s5_ready),
    .out_valid(s6_valid), .out_tok(s6_tok), .out_ready(s6_ready),
    .sb_en(p6_en), .sb_addr(p6_addr), .sb_rdata, .sb_gnt(!c_sb_en),
    .clr_valid(clr_v), .clr_cid,
    .m_we(x6_we), .m_addr(x6_addr), .m_wdata(x6_wdata), .m_rdata(m6_rdata),
    .q_we(c_q_we), .q_addr(c_q_addr), .q_wdata(c_q_wdata), .q_rdata(c_q_rdata),
    .rec_valid(rec6_v), .rec_id(rec6_id),
    .ev_match(ev[EV_MATCH]), .idle(idle6));

  // ---------------------------------------------------------------- stage 7
  alert_gen #(.MAX_RIDS(MAX_RIDS)) u_s7 (
    .clk, .rst_n,
    .in_valid(s6_valid), .in_tok(s6_tok), .in_ready(s6_ready),
    .cur_flow,
    .resp_valid, .resp_w0, .resp_w1, .resp_ready,
    .out_bus(alert_w), .out_stop(alert_w_stop),
    .ev_alert(ev[EV_ALERT]), .idle(idle7));

  // ---------------------------------------------------------------- context
  context_storage #(.NUM_ID(NUM_ID)) u_ctx (
    .clk, .rst_n,
    .rec2_valid(rec2_v), .rec2_id, .rec5_valid(rec5_v), .rec5_id, .rec6_valid(rec6_v), .rec6_id,
    .sw_req(ctx_req), .old_valid(ctx_old_valid), .old_flow(ctx_old_flow), .new_flow(ctx_new_flow),
    .sw_done(ctx_done), .busy(ctx_busy),
    .m2_we(x2_we), .m2_addr(x2_addr), .m2_wdata(x2_wdata), .m2_rdata,
    .m5_we(x5_we), .m5_addr(x5_addr), .m5_wdata(x5_wdata), .m5_rdata,
    .m6_we(x6_we), .m6_addr(x6_addr), .m6_wdata(x6_wdata), .m6_rdata,
    .sd_req, .sd_we, .sd_addr, .sd_wdata, .sd_gnt, .sd_rvalid, .sd_rdata,
    .ev_sw(ev[EV_CTX_SW]), .ev_ovf(ev[EV_CTX_OVF]));

  // ---------------------------------------------------------------- events
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ev_cnt <= '0;
    else for (int k = 0; k < NUM_EV; k++) if (ev[k]) ev_cnt[k] <= ev_cnt[k] + 1'b1;
  end

  // The clear walk and a context swap never overlap (swaps need an empty pipeline).
  a_no_clear_in_swap: assert property (@(posedge clk) disable iff (!rst_n) !(ctx_busy && clr_v));
endmodule
