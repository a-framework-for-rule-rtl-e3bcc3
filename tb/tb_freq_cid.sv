// tb_freq_cid: frequent-CID unit with 4 entries and a 64-word table.
// Programs three frequent CIDs: CID 100 with four header groups (HIDs 10..13,
// 3, 1, 0 and 2 rules), CID 200 with one group of 6 rules, and CID 300 with
// one empty group. A fourth entry holds CID 400 but is not valid. A model
// header bit-vector answers the unit's queries and changes between rounds.
// Random CID tokens (frequent or not) and end-of-message tokens are sent with
// random back-pressure. A reference expands each frequent CID into the RIDs of
// the groups whose header is set and passes every other token unchanged; the
// output must match it in order. Also checks the timing of one CID, which must
// take one cycle per group plus one per RID passed on, and the event outputs.
// (The table below is written at addresses 0, 20 and 40.)
module tb_freq_cid;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, cam_we, tab_we, hq_set, ev_freq, ev_skip, idle;
  tok_t in_tok, out_tok;
  logic [SRAM_AW-1:0] cfg_addr;
  logic [SRAM_DW-1:0] cfg_data;
  logic [ID_W-1:0] hq_id;
  bit   hbit [64];
  tok_t expq [$];
  int   n_freq = 0, n_skip = 0;
  // reference table: groups per frequent CID
  int   g_hid [int][$];
  int   g_rids [int][$];   // flattened: RIDs of group k of CID c at g_rids[c*16+k]

  freq_cid #(.NUM_FREQ(4), .TAB_DEPTH(64)) dut (.*);

  assign hq_set = hbit[hq_id[5:0]];
  always @(posedge clk) if (rst_n) begin
    if (ev_freq) n_freq++;
    if (ev_skip) n_skip++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    tok_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL: unexpected token %0d/%0d", out_tok.kind, out_tok.id); end
    else begin
      e = expq.pop_front();
      if (out_tok.kind != e.kind || out_tok.id != e.id) begin
        failures++; $display("FAIL: got %0d/%0d exp %0d/%0d", out_tok.kind, out_tok.id, e.kind, e.id);
      end
    end
  end

  task automatic cfg(bit cam, int addr, logic [35:0] d);
    @(negedge clk); cam_we = cam; tab_we = !cam; cfg_addr = SRAM_AW'(addr); cfg_data = d;
    @(posedge clk); #1 cam_we = 0; tab_we = 0;
  endtask

  function automatic logic [35:0] tword(bit last, bit grp, int n, int id);
    return 36'({last, grp, 8'(n), ID_W'(id)});
  endfunction

  // write CID c's entry and its groups from table address a
  task automatic load_cid(int c, int a, int entry);
    int ng = g_hid[c].size();
    cfg(1, entry, 36'({1'b1, ID_W'(c), 16'(a)}));
    for (int k = 0; k < ng; k++) begin
      int n = g_rids[c * 16 + k].size();
      cfg(0, a, tword(k == ng - 1, 1, n, g_hid[c][k])); a++;
      for (int j = 0; j < n; j++) begin
        cfg(0, a, tword(k == ng - 1 && j == n - 1, 0, 0, g_rids[c * 16 + k][j])); a++;
      end
    end
  endtask

  function automatic void expect_tok(tok_t t);
    bit freq = t.kind == TK_ID && g_hid.exists(int'(t.id));
    if (!freq) begin expq.push_back(t); return; end
    foreach (g_hid[int'(t.id)][k])
      if (hbit[g_hid[int'(t.id)][k]])
        foreach (g_rids[int'(t.id) * 16 + k][j]) begin
          tok_t r = '0;
          r.kind = TK_RID; r.id = ID_W'(g_rids[int'(t.id) * 16 + k][j]);
          expq.push_back(r);
        end
  endfunction

  initial begin
    int cids [8] = '{100, 200, 300, 400, 5, 6, 7, 8};
    in_valid = 0; in_tok = '0; out_ready = 1; cam_we = 0; tab_we = 0; cfg_addr = '0; cfg_data = '0;
    foreach (hbit[i]) hbit[i] = 0;
    g_hid[100] = '{10, 11, 12, 13};
    g_rids[1600] = '{1001, 1002, 1003}; g_rids[1601] = '{1004}; g_rids[1602] = {}; g_rids[1603] = '{1005, 1006};
    g_hid[200] = '{10};
    g_rids[3200] = '{2001, 2002, 2003, 2004, 2005, 2006};
    g_hid[300] = '{14};
    g_rids[4800] = {};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    load_cid(100, 0, 0);
    load_cid(200, 20, 1);
    load_cid(300, 40, 2);
    cfg(1, 3, 36'({1'b0, ID_W'(400), 16'd50}));   // entry present but not valid

    // timing: CID 100 with headers 10, 12 and 13 set: 4 group cycles and 5 RID
    // cycles, then one more until the last RID has left the output register
    hbit[10] = 1; hbit[12] = 1; hbit[13] = 1;
    begin
      tok_t t = '0;
      int cyc = 0;
      t.kind = TK_ID; t.id = 100; expect_tok(t);
      @(negedge clk); in_valid = 1; in_tok = t;
      @(posedge clk); #1 in_valid = 0;
      while (!idle) begin @(posedge clk); #1 cyc++; end
      checks++; if (cyc != 10) begin failures++; $display("FAIL: CID 100 took %0d cycles, expected 10", cyc); end
    end
    // random rounds
    for (int r = 0; r < 8; r++) begin
      foreach (hbit[i]) hbit[i] = ($urandom_range(1) == 1);
      for (int i = 0; i < 60; i++) begin
        tok_t t = '0;
        bit ok;
        t.kind = ($urandom_range(7) == 0) ? TK_EOM : TK_ID;
        t.id = ID_W'(cids[$urandom_range(7)]);
        @(negedge clk);
        out_ready = ($urandom_range(3) != 0);
        in_valid = 1; in_tok = t;
        #1 ok = in_ready;
        while (!ok) begin @(negedge clk); out_ready = ($urandom_range(3) != 0); #1 ok = in_ready; end
        expect_tok(t);
        @(posedge clk); #1 in_valid = 0;
      end
      @(negedge clk); out_ready = 1;
      wait (idle && expq.size() == 0);
    end
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL: %0d tokens missing", expq.size()); end
    checks++; if (n_freq == 0 || n_skip == 0) begin failures++; $display("FAIL: events freq %0d skip %0d", n_freq, n_skip); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
