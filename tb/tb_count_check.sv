// tb_count_check: stage 6 with 256 rules. Required counts are written
// through the control port. Phase 1: three rules with CID lists in a model
// SRAM; checks that a rule matches exactly when its count is reached, that
// its CIDs are then cleared one per list node, that its count restarts so it
// can match again, that a rule needing one signature matches at once and that
// direct (header-only) and end-of-message tokens pass. Phase 2: 600 random
// RIDs of 50 rules needing 1..15 signatures, with random back-pressure,
// against reference counters.
module tb_count_check;
  import rp_pkg::*;
  localparam int unsigned N = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, sb_en, sb_gnt, clr_valid;
  logic m_we, q_we, rec_valid, ev_match, idle;
  tok_t in_tok, out_tok;
  logic [SRAM_AW-1:0] sb_addr;
  logic [SRAM_DW-1:0] sb_rdata;
  logic [ID_W-1:0] clr_cid, rec_id;
  logic [$clog2(N)-1:0] m_addr, q_addr;
  logic [CNT_W-1:0] m_wdata, m_rdata, q_wdata, q_rdata;
  tok_t expq [$];
  int   clrq [$];
  int   ref_cnt [N], ref_req [N];
  int   n_rec = 0;

  count_check #(.NUM_RULE(N)) dut (.*);
  zbt_sram_model #(.DEPTH(1024)) sram (.clk, .en(sb_en && sb_gnt), .we(1'b0), .addr(sb_addr),
                                       .wdata('0), .rdata(sb_rdata));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      tok_t e;
      checks++;
      e = expq.pop_front();
      if (out_tok.kind != e.kind || out_tok.id != e.id) begin
        failures++; $display("FAIL: got %0d/%0d exp %0d/%0d", out_tok.kind, out_tok.id, e.kind, e.id);
      end
    end
    if (clr_valid) begin
      int c;
      checks++;
      c = clrq.pop_front();
      if (int'(clr_cid) != c) begin failures++; $display("FAIL: clear %0d exp %0d", clr_cid, c); end
    end
    if (rec_valid) n_rec++;
  end

  task automatic setq(int r, int v);
    @(negedge clk); q_we = 1; q_addr = 8'(r); q_wdata = 4'(v); ref_req[r] = v;
    @(negedge clk); q_we = 0;
  endtask

  task automatic send(tok_t t);
    @(negedge clk); in_valid = 1; in_tok = t;
    #1; while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask

  function automatic tok_t rid(int r, bit pv, int ptr);
    tok_t t;
    t = '0; t.kind = TK_ID; t.id = ID_W'(r); t.pvalid = pv; t.ptr = SRAM_AW'(ptr);
    return t;
  endfunction

  function automatic logic [SRAM_DW-1:0] nd(int cid, bit nv, int nx);
    node_t n;
    n = '{valid: 1'b1, id: ID_W'(cid), nvalid: nv, next: SRAM_AW'(nx)};
    return SRAM_DW'(n);
  endfunction

  initial begin
    tok_t t;
    in_valid = 0; in_tok = '0; out_ready = 1; sb_gnt = 1; m_we = 0; m_addr = '0; m_wdata = '0;
    q_we = 0; q_addr = '0; q_wdata = '0;
    for (int i = 0; i < int'(N); i++) begin ref_cnt[i] = 0; ref_req[i] = 0; end
    #1;
    sram.mem[200] = nd(10, 1, 201); sram.mem[201] = nd(11, 1, 202); sram.mem[202] = nd(12, 0, 0);
    sram.mem[300] = nd(20, 1, 301); sram.mem[301] = nd(21, 0, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    setq(1, 3); setq(2, 1); setq(3, 2);
    @(negedge clk); q_addr = 1; #1 checks++; if (q_rdata != 3) begin failures++; $display("FAIL: q_rdata"); end
    // phase 1
    send(rid(1, 1, 200)); send(rid(1, 1, 200)); send(rid(3, 1, 300));
    @(negedge clk); m_addr = 1; #1 checks++; if (m_rdata != 2) begin failures++; $display("FAIL: count 2"); end
    expq.push_back(rid(1, 0, 0)); clrq.push_back(10); clrq.push_back(11); clrq.push_back(12);
    send(rid(1, 1, 200));
    expq.push_back(rid(2, 0, 0));
    send(rid(2, 0, 0));
    t = '0; t.kind = TK_DIRECT; t.id = 77; send(t);
    t.kind = TK_ID; expq.push_back(t);
    t = '0; t.kind = TK_EOM; expq.push_back(t); send(t);
    expq.push_back(rid(3, 0, 0)); clrq.push_back(20); clrq.push_back(21);
    send(rid(3, 1, 300));
    send(rid(1, 1, 200)); send(rid(1, 1, 200));
    expq.push_back(rid(1, 0, 0)); clrq.push_back(10); clrq.push_back(11); clrq.push_back(12);
    send(rid(1, 1, 200));
    wait (idle && expq.size() == 0);
    checks++; if (clrq.size() != 0 || n_rec != 2) begin failures++; $display("FAIL: clears left %0d rec %0d", clrq.size(), n_rec); end
    // phase 2
    for (int r = 50; r < 100; r++) setq(r, 1 + r % 15);
    fork
      begin
        for (int i = 0; i < 600; i++) begin
          automatic int r = 50 + $urandom_range(49);
          ref_cnt[r]++;
          if (ref_cnt[r] == ref_req[r]) begin ref_cnt[r] = 0; expq.push_back(rid(r, 0, 0)); end
          send(rid(r, 0, 0));
        end
      end
      begin
        repeat (4000) begin @(negedge clk); out_ready = ($urandom_range(2) != 0); end
        out_ready = 1;
      end
    join_any
    wait (idle && expq.size() == 0);
    for (int r = 50; r < 100; r++) begin
      @(negedge clk); m_addr = 8'(r);
      #1 checks++;
      if (int'(m_rdata) != ref_cnt[r]) begin failures++; $display("FAIL: rule %0d count %0d exp %0d", r, m_rdata, ref_cnt[r]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
