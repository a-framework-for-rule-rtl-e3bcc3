// tb_rule_processor: end-to-end test of the rule processor at its full size
// (32,768 IDs, default parameters), with model SRAM banks and a model context
// memory. It programs a random rule set through the control interface
// (CID -> RID lists in bank A, RID -> HID words and rule CID lists in bank B,
// required counts) and loads the two CIDs with the most rules into the
// frequent-CID unit, grouped by header rule; the reference then takes their
// rules in that group order. It then sends ID messages for interleaved flows and compares
// every alert with a reference model that applies the rule semantics
// directly: a rule fires when its header rule matched in the flow and all its
// signatures were seen since it last fired.
// Phases: (1) 150 random packets over flows 0..6, one message at a time;
// (2) a packet with 260 matching rules (alert list overflow) and one with 140
// new CIDs (context list overflow); (3) a burst of 80 messages sent back to
// back while the alert output is stopped, so the input FIFO fills and stop
// reaches the sender; (4) the header check switched off. Finally the event
// counters are read through the control interface. Each mechanism must have
// happened at least once: repeated CID, multi-rule CID list, header-check
// drop, header-only rule, rule firing again after its CIDs were cleared,
// context save and restore, stateless flow 0, alert overflow, context
// overflow, input stop, alert stop, control read, header check off,
// frequent CID taken, frequent-CID group skipped.
// Content messages of phases 1 and 4 are cut short before a CID that would hit
// the known same-message clear race described in rule_processor.
module tb_rule_processor;
  import rp_pkg::*;
  localparam int NID = 32768, HOB = 32512;
  localparam int NRULE = 40, NPOOL = 40;   // keeps each flow within 128 context entries

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  wbus_t id_in, ctl_in, alert_out;
  logic  id_stop, ctl_stop, alert_stop;
  logic  sa_en, sa_we, sb_en, sb_we;
  logic [SRAM_AW-1:0] sa_addr, sb_addr;
  logic [SRAM_DW-1:0] sa_wdata, sa_rdata, sb_wdata, sb_rdata;
  logic  sd_req, sd_we, sd_gnt, sd_rvalid;
  logic [SD_AW-1:0] sd_addr;
  logic [SD_DW-1:0] sd_wdata, sd_rdata;

  rule_processor dut (.*);
  zbt_sram_model bank_a (.clk, .en(sa_en), .we(sa_we), .addr(sa_addr), .wdata(sa_wdata), .rdata(sa_rdata));
  zbt_sram_model bank_b (.clk, .en(sb_en), .we(sb_we), .addr(sb_addr), .wdata(sb_wdata), .rdata(sb_rdata));
  ctx_mem_model  sdram  (.clk, .req(sd_req), .we(sd_we), .addr(sd_addr), .wdata(sd_wdata),
                         .gnt(sd_gnt), .rvalid(sd_rvalid), .rdata(sd_rdata));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ rule set
  typedef int iq_t [$];
  int   r_rid [$], r_hid [$], r_req [$];
  iq_t  r_cids [$];
  iq_t  rules_of_cid [int];    // CID -> rule indices, list order
  int   rule_of_rid [int];
  int   flow_hids [int] [$];
  int   alloc_a = 40000, alloc_b = 40000;

  // ------------------------------------------------------------ reference
  bit   ref_cid [longint], ref_hid [longint];
  int   ref_cnt [longint];
  bit   hdr_en = 1;
  bit   ref_valid = 0;
  int   ref_flow = 0, epoch0 = 0;
  iq_t  exp_alerts [$];
  int   exp_flow [$];
  bit   exp_ovf [$];
  int   n_exp_match = 0;
  // mechanism counts observed by the reference
  int   m_dup = 0, m_multi = 0, m_hdrdrop = 0, m_ho = 0, m_refire = 0, m_restore = 0, m_flow0 = 0;
  bit   fired [int];

  function automatic longint fk(int flow);
    return (flow == 0) ? (longint'(1) << 20) + longint'(epoch0) : longint'(flow);
  endfunction
  function automatic longint key(int flow, int id);
    return (fk(flow) << 16) + longint'(id);
  endfunction

  function automatic void ref_switch(int flow, bit hdr);
    if (!ref_valid || flow != ref_flow || (flow == 0 && hdr)) begin
      if (flow == 0) begin epoch0++; m_flow0++; end
      if (ref_valid && flow != 0 && flow != ref_flow && (ref_hid.exists(key(flow, flow_hids[flow][0]))))
        m_restore++;
      ref_valid = 1; ref_flow = flow;
    end
  endfunction

  function automatic void ref_msg(bit hdr, int flow, int ids [$]);
    int al [$];
    ref_switch(flow, hdr);
    foreach (ids[k]) begin
      int c = ids[k];
      if (hdr) begin
        if (c >= HOB) begin al.push_back(c); m_ho++; end
        else ref_hid[key(flow, c)] = 1;
      end else begin
        if (ref_cid.exists(key(flow, c)) && ref_cid[key(flow, c)]) begin m_dup++; continue; end
        ref_cid[key(flow, c)] = 1;
        if (!rules_of_cid.exists(c)) continue;
        if (rules_of_cid[c].size() > 1) m_multi++;
        foreach (rules_of_cid[c][j]) begin
          int r = rules_of_cid[c][j];
          longint rk = key(flow, r_rid[r]);
          if (hdr_en && !(ref_hid.exists(key(flow, r_hid[r])))) begin m_hdrdrop++; continue; end
          if (!ref_cnt.exists(rk)) ref_cnt[rk] = 0;
          ref_cnt[rk]++;
          if (ref_cnt[rk] == r_req[r]) begin
            ref_cnt[rk] = 0;
            al.push_back(r_rid[r]);
            if (fired.exists(r)) m_refire++;
            fired[r] = 1;
            foreach (r_cids[r][q]) ref_cid[key(flow, r_cids[r][q])] = 0;
          end
        end
      end
    end
    if (al.size() > 0) begin
      n_exp_match += al.size();
      exp_ovf.push_back(al.size() > 256);
      while (al.size() > 256) void'(al.pop_back());
      exp_alerts.push_back(al);
      exp_flow.push_back(flow);
    end
  endfunction

  // Length of the longest prefix of a content message that avoids one known
  // case the pipeline does not follow: a CID already seen in the flow that is
  // cleared by a rule firing earlier in the same message and then appears
  // again later in it (stage 2 may pass the CID before the clear arrives).
  function automatic int safe_len(int flow, int ids [$]);
    bit lc [longint];
    int lcnt [longint];
    bit cleared [longint];
    foreach (ids[k]) begin
      int c = ids[k];
      longint ck = key(flow, c);
      bit was = lc.exists(ck) ? lc[ck] : (ref_cid.exists(ck) && ref_cid[ck]);
      if (cleared.exists(ck)) return k;
      if (was) continue;
      lc[ck] = 1;
      if (!rules_of_cid.exists(c)) continue;
      foreach (rules_of_cid[c][j]) begin
        int r = rules_of_cid[c][j];
        longint rk = key(flow, r_rid[r]);
        int n;
        if (hdr_en && !(ref_hid.exists(key(flow, r_hid[r])))) continue;
        n = lcnt.exists(rk) ? lcnt[rk] : (ref_cnt.exists(rk) ? ref_cnt[rk] : 0);
        n++;
        if (n == r_req[r]) begin
          n = 0;
          foreach (r_cids[r][q]) begin
            longint qk = key(flow, r_cids[r][q]);
            if (lc.exists(qk) ? lc[qk] : (ref_cid.exists(qk) && ref_cid[qk])) cleared[qk] = 1;
            lc[qk] = 0;
          end
        end
        lcnt[rk] = n;
      end
    end
    return ids.size();
  endfunction

  // ------------------------------------------------------------ alert monitor
  int   n_alert = 0, n_ovf = 0, n_resp = 0, n_astop = 0, n_istop = 0;
  logic [31:0] resp_q [$];
  bit   in_msg = 0, is_resp = 0;
  int   cur_rids [$];
  logic [15:0] cur_flags, cur_fl;
  bit   stop_random = 1, stop_hold = 0;

  always @(posedge clk) if (rst_n) begin
    if (alert_out.en && !alert_stop) begin
      if (alert_out.sod) begin
        is_resp = (alert_out.data[31:28] == RESP_TAG);
        cur_rids = {};
        cur_flags = alert_out.data[31:16];
        cur_fl = alert_out.data[15:0];
        if (is_resp) resp_q.push_back(alert_out.data);
      end else if (is_resp) begin
        resp_q.push_back(alert_out.data);
      end else begin
        cur_rids.push_back(int'(alert_out.data[31:16]));
        if (alert_out.vb == 4) cur_rids.push_back(int'(alert_out.data[15:0]));
      end
      if (alert_out.eod) begin
        if (is_resp) n_resp++;
        else begin
          int e [$];
          bit eo;
          int ef;
          n_alert++;
          checks++;
          if (exp_alerts.size() == 0) begin failures++; $display("FAIL: unexpected alert flow %0d", cur_fl); end
          else begin
            e = exp_alerts.pop_front(); ef = exp_flow.pop_front(); eo = exp_ovf.pop_front();
            if (e != cur_rids || ef != int'(cur_fl) || eo != cur_flags[1] || !cur_flags[0]) begin
              failures++;
              $display("FAIL: alert flow %0d ovf %b rids %p, expected flow %0d ovf %b rids %p",
                       cur_fl, cur_flags[1], cur_rids, ef, eo, e);
            end
            if (cur_flags[1]) n_ovf++;
          end
        end
      end
    end
    if (alert_stop && alert_out.en) n_astop++;
    if (id_stop) n_istop++;
    alert_stop <= stop_hold || (stop_random && $urandom_range(3) == 0);
  end

  // ------------------------------------------------------------ bus drivers
  task automatic ctl_word(bit s, bit e, logic [31:0] d);
    @(negedge clk);
    ctl_in = '0; ctl_in.en = 1; ctl_in.sod = s; ctl_in.eod = e; ctl_in.data = d; ctl_in.vb = 4;
    #1; while (ctl_stop) begin @(negedge clk); #1; end
    @(posedge clk); #1 ctl_in = '0;
  endtask

  task automatic cmd(op_e op, int addr, logic [35:0] data);
    ctl_word(1, 0, {op, data[35:32], 6'b0, SRAM_AW'(addr)});
    ctl_word(0, 1, data[31:0]);
  endtask

  task automatic id_word(bit s, bit e, logic [31:0] d, int vb);
    @(negedge clk);
    id_in = '0; id_in.en = 1; id_in.sod = s; id_in.eod = e; id_in.data = d; id_in.vb = VB_W'(vb);
    #1; while (id_stop) begin @(negedge clk); #1; end
    @(posedge clk); #1 id_in = '0;
  endtask

  task automatic send_msg(bit hdr, int flow, int ids [$]);
    ref_msg(hdr, flow, ids);
    id_word(1, ids.size() == 0, {hdr ? FLAG_HEADER : 16'h0, 16'(flow)}, 4);
    for (int k = 0; k < ids.size(); k += 2) begin
      automatic bit two = (k + 1 < ids.size());
      id_word(0, k + 2 >= ids.size(), {16'(ids[k]), two ? 16'(ids[k+1]) : 16'h0}, two ? 4 : 2);
    end
  endtask

  task automatic drain();
    repeat (2) @(posedge clk);
    while (!(dut.pipe_idle && dut.u_s1.empty && !id_in.en)) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  function automatic logic [35:0] node(bit v, int id, bit nv, int nx);
    node_t n;
    n = '{valid: v, id: ID_W'(id), nvalid: nv, next: SRAM_AW'(nx)};
    return SRAM_DW'(n);
  endfunction

  // ------------------------------------------------------------ programming
  task automatic add_rule(int rid, int hid, int cids [$]);
    int r = r_rid.size();
    r_rid.push_back(rid); r_hid.push_back(hid); r_req.push_back(cids.size()); r_cids.push_back(cids);
    rule_of_rid[rid] = r;
    foreach (cids[k]) begin
      if (!rules_of_cid.exists(cids[k])) rules_of_cid[cids[k]] = {};
      rules_of_cid[cids[k]].push_back(r);
    end
  endtask

  // the two pool CIDs used by the most rules go to the frequent-CID unit:
  // per CID one group word per header rule, followed by that group's RIDs
  task automatic program_freq();
    int a = 0;
    int best [$];
    for (int e = 0; e < 2; e++) begin
      int c = -1;
      int hs [$];
      int grouped [$];
      foreach (rules_of_cid[k])
        if (k < 20000 && !(k inside {best}) && (c < 0 || rules_of_cid[k].size() > rules_of_cid[c].size())) c = k;
      best.push_back(c);
      cmd(OP_WR_FCAM, e, 36'({1'b1, ID_W'(c), 16'(a)}));
      foreach (rules_of_cid[c][j]) if (!(r_hid[rules_of_cid[c][j]] inside {hs})) hs.push_back(r_hid[rules_of_cid[c][j]]);
      foreach (hs[g]) begin
        int rs [$];
        foreach (rules_of_cid[c][j]) if (r_hid[rules_of_cid[c][j]] == hs[g]) begin
          rs.push_back(r_rid[rules_of_cid[c][j]]); grouped.push_back(rules_of_cid[c][j]);
        end
        cmd(OP_WR_FTAB, a, 36'({g == hs.size() - 1, 1'b1, 8'(rs.size()), ID_W'(hs[g])})); a++;
        foreach (rs[j]) begin
          cmd(OP_WR_FTAB, a, 36'({g == hs.size() - 1 && j == rs.size() - 1, 1'b0, 8'd0, ID_W'(rs[j])})); a++;
        end
      end
      $display("frequent CID %0d: %0d rules in %0d header groups", c, rules_of_cid[c].size(), hs.size());
      rules_of_cid[c] = grouped;   // the unit hands on the RIDs group by group
    end
  endtask

  task automatic program_rules();
    // bank A: one list per CID
    foreach (rules_of_cid[c]) begin
      int addr = c;
      for (int j = 0; j < rules_of_cid[c].size(); j++) begin
        bit last = (j == rules_of_cid[c].size() - 1);
        int nx = last ? 0 : alloc_a;
        cmd(OP_WR_A, addr, node(1, r_rid[rules_of_cid[c][j]], !last, nx));
        if (!last) begin addr = alloc_a; alloc_a++; end
      end
    end
    // bank B: rule words and their CID lists; required counts
    foreach (r_rid[r]) begin
      int head = alloc_b;
      cmd(OP_WR_B, r_rid[r], node(1, r_hid[r], r_cids[r].size() > 0, head));
      foreach (r_cids[r][k]) begin
        bit last = (k == r_cids[r].size() - 1);
        cmd(OP_WR_B, alloc_b, node(1, r_cids[r][k], !last, alloc_b + 1));
        alloc_b++;
      end
      cmd(OP_WR_REQ, r_rid[r], 36'(r_cids[r].size()));
    end
  endtask

  function automatic int pool(int k);
    return 5 + 37 * k;
  endfunction

  // ------------------------------------------------------------ main
  initial begin
    int ev [NUM_EV];
    id_in = '0; ctl_in = '0; alert_stop = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // random rules over a pool of 48 CIDs and 8 header rules
    for (int r = 0; r < NRULE; r++) begin
      automatic int n = 1 + $urandom_range(3);
      automatic int cs [$];
      automatic int rid;
      while (cs.size() < n) begin
        automatic int c = pool($urandom_range(NPOOL - 1));
        if (!(c inside {cs})) cs.push_back(c);
      end
      do rid = $urandom_range(HOB - 1); while (rule_of_rid.exists(rid) || (rid >= 10000 && rid < 10300));
      add_rule(rid, 100 + $urandom_range(7), cs);
    end
    // 260 single-signature rules for the alert overflow and the burst
    for (int k = 0; k < 260; k++) begin
      automatic int cs [$] = '{20000 + k};
      add_rule(10000 + k, 100, cs);
    end
    program_rules();
    program_freq();
    // the control and ID inputs are independent: wait until every write is done
    cmd(OP_RD_EVT, 0, '0);
    wait (resp_q.size() == 2);
    resp_q = {};
    // header rules per flow; flows 2 and 5 also match a header-only rule
    for (int f = 0; f <= 9; f++) begin
      flow_hids[f] = {};
      flow_hids[f].push_back(100 + (f % 8));
      flow_hids[f].push_back(100 + ((3 * f + 1) % 8));
      if (f == 2 || f == 5) flow_hids[f].push_back(HOB + f);
    end
    flow_hids[8] = '{100};
    $display("rules programmed at cycle %0t", $time);

    // phase 1: random packets, one message at a time
    for (int p = 0; p < 150; p++) begin
      automatic int f = $urandom_range(6);
      automatic int cs [$];
      automatic int n = 1 + $urandom_range(7);
      if (f == 0 || !ref_hid.exists(key(f, flow_hids[f][0])) || f == 2 && p % 10 == 0) begin
        send_msg(1, f, flow_hids[f]); drain();
      end
      while (cs.size() < n) begin
        automatic int c = pool($urandom_range(NPOOL - 1));
        if (!(c inside {cs})) cs.push_back(c);
      end
      while (cs.size() > safe_len(f, cs)) void'(cs.pop_back());
      send_msg(0, f, cs); drain();
    end
    $display("phase 1 done at %0t", $time);
    // phase 2: alert overflow (260 matches) and context overflow (140 new CIDs)
    begin
      automatic int cs [$];
      send_msg(1, 8, flow_hids[8]); drain();
      for (int k = 0; k < 260; k++) cs.push_back(20000 + k);
      send_msg(0, 8, cs); drain();
      cs = {};
      for (int k = 0; k < 140; k++) cs.push_back(25000 + k);
      send_msg(0, 9, cs); drain();
    end
    // phase 3: burst of 80 messages with the alert output stopped at first
    stop_hold = 1;
    fork
      begin repeat (3000) @(posedge clk); stop_hold = 0; end
      for (int m = 0; m < 80; m++) begin
        automatic int cs [$];
        for (int k = 0; k < 3; k++) cs.push_back(20000 + 3 * m + k);
        for (int k = 0; k < 12; k++) cs.push_back(26000 + 12 * m + k);
        send_msg(0, 8, cs);
      end
    join
    drain();
    // phase 4: header check off
    cmd(OP_WR_CFG, 0, 36'd0); hdr_en = 0;
    for (int p = 0; p < 20; p++) begin
      automatic int cs [$];
      automatic int f = 3 + $urandom_range(1);
      while (cs.size() < 4) begin
        automatic int c = pool($urandom_range(NPOOL - 1));
        if (!(c inside {cs})) cs.push_back(c);
      end
      while (cs.size() > safe_len(f, cs)) void'(cs.pop_back());
      send_msg(0, f, cs); drain();
    end
    // read the event counters
    for (int k = 0; k < NUM_EV; k++) begin
      cmd(OP_RD_EVT, k, '0);
      wait (resp_q.size() == 2);
      ev[k] = int'(resp_q[1]);
      resp_q = {};
    end
    drain();
    repeat (20) @(posedge clk);
    $display("alerts %0d (ovf %0d) responses %0d; events ids %0d fwd %0d dup %0d rids %0d hdrdrop %0d match %0d alert %0d ctxsw %0d ctxovf %0d freq %0d freqskip %0d",
             n_alert, n_ovf, n_resp, ev[0], ev[1], ev[2], ev[3], ev[4], ev[5], ev[6], ev[7], ev[8], ev[9], ev[10]);
    $display("reference: dup %0d multi %0d hdrdrop %0d headeronly %0d refire %0d restore %0d flow0 %0d stops id %0d alert %0d",
             m_dup, m_multi, m_hdrdrop, m_ho, m_refire, m_restore, m_flow0, n_istop, n_astop);
    checks++; if (exp_alerts.size() != 0) begin failures++; $display("FAIL: %0d alerts missing", exp_alerts.size()); end
    checks++; if (ev[EV_MATCH] != n_exp_match) begin failures++; $display("FAIL: match count %0d exp %0d", ev[EV_MATCH], n_exp_match); end
    checks++; if (ev[EV_ALERT] != n_alert) begin failures++; $display("FAIL: alert count"); end
    checks++; if (ev[EV_CID_DUP] != m_dup) begin failures++; $display("FAIL: dup count %0d exp %0d", ev[EV_CID_DUP], m_dup); end
    // every mechanism happened
    checks++; if (m_dup == 0)      begin failures++; $display("FAIL: no repeated CID"); end
    checks++; if (m_multi == 0)    begin failures++; $display("FAIL: no multi-rule list"); end
    checks++; if (ev[EV_HDR_DROP] == 0) begin failures++; $display("FAIL: no header drop"); end
    checks++; if (ev[EV_FREQ] == 0 || ev[EV_FREQ_SKIP] == 0) begin failures++; $display("FAIL: frequent-CID unit unused (%0d, %0d)", ev[EV_FREQ], ev[EV_FREQ_SKIP]); end
    checks++; if (m_ho == 0)       begin failures++; $display("FAIL: no header-only rule"); end
    checks++; if (m_refire == 0)   begin failures++; $display("FAIL: no rule fired twice"); end
    checks++; if (m_restore == 0 || ev[EV_CTX_SW] == 0) begin failures++; $display("FAIL: no context restore"); end
    checks++; if (m_flow0 == 0)    begin failures++; $display("FAIL: no flow 0"); end
    checks++; if (n_ovf == 0)      begin failures++; $display("FAIL: no alert overflow"); end
    checks++; if (ev[EV_CTX_OVF] == 0) begin failures++; $display("FAIL: no context overflow"); end
    checks++; if (n_istop == 0)    begin failures++; $display("FAIL: input never stopped"); end
    checks++; if (n_astop == 0)    begin failures++; $display("FAIL: alert never stopped"); end
    checks++; if (n_resp < NUM_EV) begin failures++; $display("FAIL: responses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
