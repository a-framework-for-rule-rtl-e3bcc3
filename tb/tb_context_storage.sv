// tb_context_storage: context storage with model bit-vectors, a model count
// RAM and the model off-chip memory (random grants, 4-cycle reads). Records
// entries for flow 1 (some in the same cycle), swaps to flow 2 and checks that
// every memory was cleared, records for flow 2, swaps back and checks flow 1's
// bits and counts came back (an entry cleared before the save stays clear).
// Then checks flow 0 is cleared but never written off-chip, and that a full
// list (130 reports for 128 entries) reports the overflow and restores all
// 128 entries from 32 words.
module tb_context_storage;
  import rp_pkg::*;
  localparam int unsigned N = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rec2_valid, rec5_valid, rec6_valid, sw_req, old_valid, sw_done, busy;
  logic [ID_W-1:0] rec2_id, rec5_id, rec6_id;
  logic [FLOW_W-1:0] old_flow, new_flow;
  logic m2_we, m2_wdata, m2_rdata, m5_we, m5_wdata, m5_rdata, m6_we;
  logic [$clog2(N)-1:0] m2_addr, m5_addr, m6_addr;
  logic [CNT_W-1:0] m6_wdata, m6_rdata;
  logic sd_req, sd_we, sd_gnt, sd_rvalid, ev_sw, ev_ovf;
  logic [SD_AW-1:0] sd_addr;
  logic [SD_DW-1:0] sd_wdata, sd_rdata;
  logic bv2 [N], bv5 [N];
  logic [CNT_W-1:0] cnt6 [N];
  int   n_ovf = 0;

  context_storage #(.NUM_ID(N)) dut (.*);
  ctx_mem_model sdram (.clk, .req(sd_req), .we(sd_we), .addr(sd_addr), .wdata(sd_wdata),
                       .gnt(sd_gnt), .rvalid(sd_rvalid), .rdata(sd_rdata));

  assign m2_rdata = bv2[m2_addr];
  assign m5_rdata = bv5[m5_addr];
  assign m6_rdata = cnt6[m6_addr];
  always @(posedge clk) begin
    if (m2_we) bv2[m2_addr] <= m2_wdata;
    if (m5_we) bv5[m5_addr] <= m5_wdata;
    if (m6_we) cnt6[m6_addr] <= m6_wdata;
    if (ev_ovf) n_ovf++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rec(int c, int h, int r, int rv);
    @(negedge clk);
    rec2_valid = (c >= 0); rec2_id = ID_W'(c); if (c >= 0) bv2[c] = 1;
    rec5_valid = (h >= 0); rec5_id = ID_W'(h); if (h >= 0) bv5[h] = 1;
    rec6_valid = (r >= 0); rec6_id = ID_W'(r); if (r >= 0) cnt6[r] = CNT_W'(rv);
    @(posedge clk); #1 rec2_valid = 0; rec5_valid = 0; rec6_valid = 0;
  endtask

  task automatic swap(bit ov, int of, int nf);
    @(negedge clk); sw_req = 1; old_valid = ov; old_flow = FLOW_W'(of); new_flow = FLOW_W'(nf);
    #1; while (!sw_done) begin @(negedge clk); #1; end
    @(posedge clk); #1 sw_req = 0;
    old_valid = 1; old_flow = FLOW_W'(nf);
  endtask

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ones();
    int s = 0;
    for (int i = 0; i < int'(N); i++) s += int'(bv2[i]) + int'(bv5[i]) + int'(cnt6[i] != 0);
    return s;
  endfunction

  initial begin
    int wr0;
    rec2_valid = 0; rec5_valid = 0; rec6_valid = 0; rec2_id = '0; rec5_id = '0; rec6_id = '0;
    sw_req = 0; old_valid = 0; old_flow = '0; new_flow = '0;
    for (int i = 0; i < int'(N); i++) begin bv2[i] = 0; bv5[i] = 0; cnt6[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    swap(0, 0, 1);
    chk("empty start", ones() == 0);
    rec(10, 5, 7, 3); rec(11, -1, -1, 0); rec(-1, 6, -1, 0); rec(12, -1, 8, 1);
    @(negedge clk); bv2[11] = 0;               // cleared by a match before the save
    swap(1, 1, 2);
    chk("all cleared after save", ones() == 0);
    chk("one word written", sdram.n_wr == 2);   // 7 entries -> 2 words
    rec(20, -1, -1, 0);
    swap(1, 2, 1);
    chk("flow 1 bits", bv2[10] && !bv2[11] && bv2[12] && bv5[5] && bv5[6] && !bv2[20]);
    chk("flow 1 counts", cnt6[7] == 3 && cnt6[8] == 1);
    // flow 0: cleared, never stored
    swap(1, 1, 0);
    rec(30, -1, -1, 0);
    wr0 = sdram.n_wr;
    swap(1, 0, 2);
    chk("flow 0 not stored", sdram.n_wr == wr0 && !bv2[30]);
    chk("flow 2 back", bv2[20] && ones() == 1);
    swap(1, 2, 3);
    // overflow: 130 reports
    for (int i = 0; i < 130; i++) rec(100 + i, -1, -1, 0);
    chk("overflow reported", n_ovf == 2);
    wr0 = sdram.n_wr;
    swap(1, 3, 4);
    chk("32 words saved", sdram.n_wr - wr0 == 32 && ones() == 2);
    swap(1, 4, 3);
    // the two reports that did not fit are not managed: they stay set
    chk("128 entries back", ones() == 130 && bv2[100] && bv2[227]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
