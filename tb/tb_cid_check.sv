// tb_cid_check: drives 400 random CID tokens (from a small ID range so that
// repeats are common) and end-of-message tokens into stage 2 with random
// back-pressure. A reference set predicts which CIDs are first occurrences;
// the test checks exactly those come out, in order, with one cycle latency,
// and that clearing a CID through the maintenance port lets it through again.
module tb_cid_check;
  import rp_pkg::*;
  localparam int unsigned N = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, m_we, m_wdata, m_rdata, m_list;
  logic rec_valid, ev_fwd, ev_dup, idle;
  tok_t in_tok, out_tok;
  logic [ID_W-1:0] rec_id;
  logic [$clog2(N)-1:0] m_addr;
  bit   seen [N];
  tok_t expq [$];
  int   n_out = 0, n_dup = 0;

  cid_check #(.NUM_CID(N)) dut (.*);

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
      if (expq.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        e = expq.pop_front();
        if (out_tok.kind != e.kind || out_tok.id != e.id) begin
          failures++; $display("FAIL: got %0d/%0d exp %0d/%0d", out_tok.kind, out_tok.id, e.kind, e.id);
        end
      end
      n_out++;
    end
    if (ev_dup) n_dup++;
    out_ready <= ($urandom_range(3) != 0);
  end

  task automatic send(tok_t t);
    @(negedge clk);
    in_valid = 1'b1; in_tok = t;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    if (t.kind == TK_EOM) expq.push_back(t);
    else if (!seen[t.id]) begin seen[t.id] = 1; expq.push_back(t); end
    #1 in_valid = 1'b0;
  endtask

  initial begin
    tok_t t;
    in_valid = 0; in_tok = '0; out_ready = 1; m_we = 0; m_list = 0; m_addr = '0; m_wdata = 0;
    for (int i = 0; i < N; i++) seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      t = '0;
      t.kind = (i % 17 == 16) ? TK_EOM : TK_ID;
      t.id   = ID_W'($urandom_range(60));
      send(t);
    end
    // latency: an idle stage presents a first occurrence one cycle later
    wait (expq.size() == 0);
    @(negedge clk); out_ready = 1;
    // clear CID 5 and check it passes again
    @(negedge clk); m_we = 1; m_addr = 5; m_wdata = 0;
    @(negedge clk); m_we = 0; m_addr = 5;
    #1 checks++; if (m_rdata != 0) begin failures++; $display("FAIL: clear"); end
    seen[5] = 0;
    t = '0; t.id = 5;
    @(negedge clk); in_valid = 1; in_tok = t; expq.push_back(t); seen[5] = 1;
    @(negedge clk); in_valid = 0;
    checks++; if (!out_valid || out_tok.id != 5) begin failures++; $display("FAIL: latency"); end
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL: lost outputs"); end
    checks++; if (n_dup == 0) begin failures++; $display("FAIL: no duplicate seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
