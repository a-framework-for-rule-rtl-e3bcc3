// tb_id_input: stage 1 ID path with an 8-word FIFO. Sends ID messages of
// both kinds for flows 5, 5, 6, 0, 0 and 7 (7 with no IDs), while the CID and
// HID consumers stall at random. Checks the CID tokens, HIDs and end-of-message
// tokens that come out against the message contents; that a context switch is
// requested exactly for the first message, a change of flow and a flow-0
// header message, with the right old and new flows, only while the pipeline is idle;
// that no message starts while hold is high; and that stop rises when the
// FIFO fills.
module tb_id_input;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  wbus_t id_in;
  logic id_stop, c_valid, c_ready, h_valid, h_ready, pipe_idle, ctx_req, ctx_old_valid, ctx_done;
  logic hold, at_boundary, ev_id;
  tok_t c_tok;
  logic [ID_W-1:0] h_id;
  logic [FLOW_W-1:0] ctx_old_flow, ctx_new_flow, cur_flow;
  tok_t cexp [$];
  int   hexp [$];
  logic [32:0] swexp [$];   // {old_valid, old flow, new flow}
  int   n_sw = 0, n_stop = 0, n_early = 0;
  int   mode = 0;      // 0 random stalls, 1 always ready, 2 blocked

  id_input #(.FIFO_DEPTH(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (c_valid && c_ready) begin
      tok_t e;
      checks++;
      e = cexp.pop_front();
      if (c_tok.kind != e.kind || (e.kind == TK_ID && c_tok.id != e.id)) begin
        failures++; $display("FAIL: cid got %0d/%0d exp %0d/%0d", c_tok.kind, c_tok.id, e.kind, e.id);
      end
    end
    if (h_valid && h_ready) begin
      checks++;
      if (int'(h_id) != hexp.pop_front()) begin failures++; $display("FAIL: hid %0d", h_id); end
    end
    if (ctx_req && !ctx_done) begin
      if (!pipe_idle) n_early++;
    end
    if (id_stop) n_stop++;
    c_ready <= (mode == 0) ? ($urandom_range(3) == 0) : (mode == 1);
    h_ready <= (mode == 0) ? ($urandom_range(1) == 0) : (mode == 1);
  end

  // context storage stand-in: answers a request a few cycles later
  initial begin
    ctx_done = 0;
    forever begin
      @(posedge clk);
      if (rst_n && ctx_req && !ctx_done) begin
        logic [32:0] e;
        checks++;
        e = swexp.pop_front();
        if ({ctx_old_valid, ctx_old_flow, ctx_new_flow} != e && !(e[32] == 1'b0 && !ctx_old_valid && ctx_new_flow == e[15:0])) begin
          failures++; $display("FAIL: switch %b %0d %0d", ctx_old_valid, ctx_old_flow, ctx_new_flow);
        end
        n_sw++;
        repeat (3) @(posedge clk);
        #1 ctx_done = 1;
        @(posedge clk); #1 ctx_done = 0;
      end
    end
  end

  task automatic put(bit s, bit e, logic [31:0] d, int vb);
    @(negedge clk);
    id_in = '0; id_in.en = 1; id_in.sod = s; id_in.eod = e; id_in.data = d; id_in.vb = VB_W'(vb);
    #1; while (id_stop) begin @(negedge clk); #1; end
    @(posedge clk); #1 id_in = '0;
  endtask

  // one message: header word then IDs two per word
  task automatic msg(bit hdr, int flow, int ids [$]);
    tok_t t;
    put(1, ids.size() == 0, {hdr ? FLAG_HEADER : 16'h0, 16'(flow)}, 4);
    for (int k = 0; k < ids.size(); k += 2) begin
      automatic bit two = (k + 1 < ids.size());
      put(0, k + 2 >= ids.size(), {16'(ids[k]), two ? 16'(ids[k+1]) : 16'h0}, two ? 4 : 2);
    end
  endtask

  task automatic expect_msg(bit hdr, int ids [$]);
    tok_t t;
    foreach (ids[k]) begin
      if (hdr) hexp.push_back(ids[k]);
      else begin t = '0; t.kind = TK_ID; t.id = ID_W'(ids[k]); cexp.push_back(t); end
    end
    t = '0; t.kind = TK_EOM; cexp.push_back(t);
  endtask

  initial begin
    automatic int a [$] = '{11, 12, 13, 14, 15};
    automatic int b [$] = '{101, 102, 103};
    automatic int c [$] = '{21, 22, 23, 24};
    automatic int d [$] = '{31};
    automatic int z [$] = '{};
    id_in = '0; c_ready = 0; h_ready = 0; pipe_idle = 0; hold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first message: switch (old invalid) only once the pipeline is idle
    swexp.push_back({1'b0, 16'd0, 16'd5}); expect_msg(0, a);
    fork msg(0, 5, a); begin repeat (30) @(posedge clk); #1 pipe_idle = 1; end join
    expect_msg(1, b); msg(1, 5, b);                                  // same flow: no switch
    swexp.push_back({1'b1, 16'd5, 16'd6}); expect_msg(0, c); msg(0, 6, c);
    swexp.push_back({1'b1, 16'd6, 16'd0}); expect_msg(0, d); msg(0, 0, d);
    swexp.push_back({1'b1, 16'd0, 16'd0}); expect_msg(1, d); msg(1, 0, d);
    // hold keeps the next message waiting
    wait (cexp.size() == 0 && hexp.size() == 0);
    @(negedge clk); hold = 1;
    swexp.push_back({1'b1, 16'd0, 16'd7}); expect_msg(0, z); msg(0, 7, z);
    repeat (20) @(posedge clk);
    checks++; if (cexp.size() != 1 || !at_boundary) begin failures++; $display("FAIL: hold ignored"); end
    @(negedge clk); hold = 0;
    wait (cexp.size() == 0);
    // FIFO fills while the consumer stalls
    @(negedge clk); mode = 2;
    begin
      automatic int big [$];
      for (int k = 0; k < 40; k++) big.push_back(200 + k);
      expect_msg(0, big);
      fork
        msg(0, 7, big);
        begin repeat (40) @(posedge clk); mode = 1; end
      join
    end
    wait (cexp.size() == 0 && hexp.size() == 0);
    repeat (3) @(posedge clk);
    checks++; if (n_sw != 5 || swexp.size() != 0) begin failures++; $display("FAIL: %0d switches", n_sw); end
    checks++; if (n_early != 0) begin failures++; $display("FAIL: switch while busy"); end
    checks++; if (n_stop == 0) begin failures++; $display("FAIL: stop never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
