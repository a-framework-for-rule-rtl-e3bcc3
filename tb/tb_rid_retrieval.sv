// tb_rid_retrieval: stage 3 against a model SRAM holding one linked list per
// CID (CID c lists c mod 5 rules, RID = 10*c + k; an empty list has an invalid
// head). Sends 200 random CIDs and end-of-message tokens with random
// back-pressure and random loss of the SRAM port, and checks the RIDs come out
// in list order. Then checks the rate: with no stalls a four-rule list yields
// its RIDs on four consecutive cycles, the first one cycle after the CID.
module tb_rid_retrieval;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, sa_en, sa_gnt, ev_rid, idle;
  tok_t in_tok, out_tok;
  logic [SRAM_AW-1:0] sa_addr;
  logic [SRAM_DW-1:0] sa_rdata;
  tok_t expq [$];
  bit   random_mode = 1;
  int   cyc = 0, first_cyc = -1, last_cyc = -1;

  rid_retrieval dut (.*);
  zbt_sram_model #(.DEPTH(4096)) sram (.clk, .en(sa_en && sa_gnt), .we(1'b0), .addr(sa_addr),
                                       .wdata('0), .rdata(sa_rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [SRAM_DW-1:0] mk(bit v, int id, bit nv, int nx);
    node_t nd;
    nd = '{valid: v, id: ID_W'(id), nvalid: nv, next: SRAM_AW'(nx)};
    return SRAM_DW'(nd);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid && out_ready) begin
      tok_t e;
      checks++;
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      e = expq.pop_front();
      if (out_tok.kind != e.kind || (e.kind == TK_ID && out_tok.id != e.id)) begin
        failures++; $display("FAIL: got %0d/%0d exp %0d/%0d", out_tok.kind, out_tok.id, e.kind, e.id);
      end
    end
    if (random_mode) begin
      out_ready <= ($urandom_range(3) != 0);
      sa_gnt    <= ($urandom_range(4) != 0);
    end
  end

  task automatic send(tok_t t);
    @(negedge clk);
    in_valid = 1'b1; in_tok = t;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  initial begin
    int nxt;
    tok_t t, r;
    in_valid = 0; in_tok = '0; out_ready = 1; sa_gnt = 1;
    nxt = 1000;
    #1;
    for (int c = 0; c < 40; c++) begin
      automatic int k = c % 5;
      if (k == 0) sram.mem[c] = mk(0, 0, 0, 0);
      else begin
        automatic int addr = c;
        for (int j = 0; j < k; j++) begin
          automatic bit last = (j == k - 1);
          sram.mem[addr] = mk(1, 10 * c + j, !last, last ? 0 : nxt);
          addr = nxt; nxt++;
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      t = '0;
      if (i % 11 == 10) t.kind = TK_EOM;
      else begin t.kind = TK_ID; t.id = ID_W'($urandom_range(39)); end
      if (t.kind == TK_EOM) expq.push_back(t);
      else for (int j = 0; j < int'(t.id) % 5; j++) begin r = '0; r.id = ID_W'(10 * t.id + j); expq.push_back(r); end
      send(t);
    end
    wait (expq.size() == 0 && idle);
    // rate check
    random_mode = 0;
    @(negedge clk); out_ready = 1; sa_gnt = 1;
    first_cyc = -1;
    for (int j = 0; j < 4; j++) begin r = '0; r.id = ID_W'(10 * 14 + j); expq.push_back(r); end
    t = '0; t.id = 14;
    @(negedge clk); in_valid = 1; in_tok = t;
    @(posedge clk); #1 in_valid = 0;
    begin automatic int start = cyc; wait (expq.size() == 0);
      @(posedge clk);
      checks++;
      if (first_cyc != start + 1 || last_cyc != start + 4) begin
        failures++; $display("FAIL: timing first %0d last %0d start %0d", first_cyc, last_cyc, start);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
