// tb_hid_mapping: stage 4 against a model SRAM where RID r (r < 100) maps to
// HID 1000 + r with CID-list head 5000 + r, and RIDs of 100 and above are not
// programmed. Sends 300 random RIDs and end-of-message tokens with random
// back-pressure and random loss of the SRAM port; checks each programmed RID
// comes out with its HID and list head, unprogrammed RIDs are dropped and the
// order is kept; then checks one RID per cycle with one cycle latency.
module tb_hid_mapping;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, sb_en, sb_gnt, idle;
  tok_t in_tok, out_tok;
  logic [SRAM_AW-1:0] sb_addr;
  logic [SRAM_DW-1:0] sb_rdata;
  tok_t expq [$];
  bit   random_mode = 1;
  int   cyc = 0, n_stream = 0;

  hid_mapping dut (.*);
  zbt_sram_model #(.DEPTH(1024)) sram (.clk, .en(sb_en && sb_gnt), .we(1'b0), .addr(sb_addr),
                                       .wdata('0), .rdata(sb_rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid && out_ready) begin
      tok_t e;
      checks++;
      e = expq.pop_front();
      if (out_tok.kind != e.kind || (e.kind == TK_ID &&
          (out_tok.id != e.id || out_tok.hid != e.hid || out_tok.ptr != e.ptr || !out_tok.pvalid))) begin
        failures++; $display("FAIL: got %p exp %p", out_tok, e);
      end
      if (!random_mode) n_stream++;
    end
    if (random_mode) begin
      out_ready <= ($urandom_range(3) != 0);
      sb_gnt    <= ($urandom_range(4) != 0);
    end
  end

  initial begin
    tok_t t, r;
    in_valid = 0; in_tok = '0; out_ready = 1; sb_gnt = 1;
    #1;
    for (int r = 0; r < 100; r++) begin
      node_t nd;
      nd = '{valid: 1'b1, id: ID_W'(1000 + r), nvalid: 1'b1, next: SRAM_AW'(5000 + r)};
      sram.mem[r] = SRAM_DW'(nd);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      t = '0;
      if (i % 13 == 12) t.kind = TK_EOM;
      else begin t.kind = TK_ID; t.id = ID_W'($urandom_range(119)); end
      if (t.kind == TK_EOM) expq.push_back(t);
      else if (t.id < 100) begin
        r = t; r.hid = ID_W'(1000 + t.id); r.ptr = SRAM_AW'(5000 + t.id); r.pvalid = 1; expq.push_back(r);
      end
      @(negedge clk); in_valid = 1; in_tok = t;
      #1; while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 in_valid = 0;
    end
    wait (expq.size() == 0 && idle);
    // streaming: 20 RIDs back to back, all ready
    random_mode = 0;
    @(negedge clk); out_ready = 1; sb_gnt = 1;
    begin
      automatic int start;
      @(negedge clk);
      start = cyc;
      for (int i = 0; i < 20; i++) begin
        t = '0; t.id = ID_W'(i);
        r = t; r.hid = ID_W'(1000 + i); r.ptr = SRAM_AW'(5000 + i); r.pvalid = 1; expq.push_back(r);
        in_valid = 1; in_tok = t;
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (n_stream != 20 || cyc != start + 21) begin
        failures++; $display("FAIL: rate %0d outputs in %0d cycles", n_stream, cyc - start);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
