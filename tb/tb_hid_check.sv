// tb_hid_check: stage 5 with a small ID space (256 HIDs, header-only range
// from 240). Phase 1 sets random HIDs and tests random RID tokens at the same
// time; a reference set decides which RIDs pass. Phase 2 sends header-only
// HIDs and checks each becomes a direct match with RID = HID. Phase 3 turns
// the header check off and checks every RID passes. Also checks one cycle
// latency, the same-cycle set/test case, the maintenance port and the query
// port used by the frequent-CID unit.
module tb_hid_check;
  import rp_pkg::*;
  localparam int unsigned N = 256, HO = 240;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic hdr_check_en, h_valid, h_ready, in_valid, in_ready, out_valid, out_ready;
  logic m_we, m_wdata, m_rdata, rec_valid, ev_drop, idle;
  logic [ID_W-1:0] h_id, rec_id, f_id;
  logic f_set;
  tok_t in_tok, out_tok;
  logic [$clog2(N)-1:0] m_addr;
  bit   hset [N];
  tok_t expq [$];
  int   n_drop = 0, n_direct = 0, n_rec = 0;

  hid_check #(.NUM_HID(N), .HO_BASE(HO)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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
      if (out_tok.kind == TK_DIRECT) n_direct++;
    end
    if (ev_drop) n_drop++;
    if (rec_valid) n_rec++;
  end

  initial begin
    tok_t t;
    bit acc, hacc;
    hdr_check_en = 1; h_valid = 0; h_id = '0; in_valid = 0; in_tok = '0; out_ready = 1;
    m_we = 0; m_addr = '0; m_wdata = 0; f_id = '0;
    for (int i = 0; i < int'(N); i++) hset[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: HIDs below the header-only range and RID queries together
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      h_valid = ($urandom_range(1) == 1);
      h_id    = ID_W'($urandom_range(HO - 1) % 64);
      t = '0; t.kind = (i % 9 == 8) ? TK_EOM : TK_ID;
      t.id = ID_W'(i); t.hid = ID_W'($urandom_range(63));
      in_valid = 1; in_tok = t;
      f_id = ID_W'($urandom_range(63));
      #1;
      hacc = h_valid && h_ready;
      acc  = in_valid && in_ready;
      checks++;
      if (f_set != (hset[f_id] || (hacc && h_id == f_id))) begin failures++; $display("FAIL: query port HID %0d", f_id); end
      @(posedge clk);
      #1;
      if (hacc) hset[h_id] = 1;
      if (acc) begin
        if (t.kind == TK_EOM || hset[t.hid]) expq.push_back(t);
      end else i--;   // retry the same token slot
      h_valid = 0; in_valid = 0;
    end
    wait (expq.size() == 0);
    // maintenance port reads what was set
    @(negedge clk); m_addr = 3;
    #1 checks++; if (m_rdata != hset[3]) begin failures++; $display("FAIL: m_rdata"); end
    // phase 2: header-only HIDs
    out_ready = 1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); h_valid = 1; h_id = ID_W'(HO + i);
      t = '0; t.kind = TK_DIRECT; t.id = ID_W'(HO + i); expq.push_back(t);
      @(posedge clk); #1 h_valid = 0;
      checks++; if (!out_valid || out_tok.kind != TK_DIRECT) begin failures++; $display("FAIL: latency"); end
    end
    // phase 3: header check off
    @(negedge clk); hdr_check_en = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      t = '0; t.id = ID_W'(500 + i); t.hid = ID_W'(200 + i); in_valid = 1; in_tok = t; expq.push_back(t);
      f_id = ID_W'(200 + i); #1 checks++; if (!f_set) begin failures++; $display("FAIL: query port with check off"); end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL: %0d missing", expq.size()); end
    checks++; if (n_drop == 0 || n_direct != 10 || n_rec == 0) begin
      failures++; $display("FAIL: drops %0d direct %0d rec %0d", n_drop, n_direct, n_rec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
