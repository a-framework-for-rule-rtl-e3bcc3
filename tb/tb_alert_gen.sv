// tb_alert_gen: stage 7 with room for 8 RIDs per alert. Sends packets of
// 0..11 matched RIDs, each closed by an end-of-message token, with random
// stop on the output, and a control response between packets. Checks each
// alert message word by word (header with flags and flow, RIDs two per word,
// vb on the last word, overflow flag above 8 RIDs), that an empty packet
// sends nothing and that the response is passed unchanged.
module tb_alert_gen;
  import rp_pkg::*;
  localparam int unsigned MAXR = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, resp_valid, resp_ready, out_stop, ev_alert, idle;
  tok_t in_tok;
  logic [FLOW_W-1:0] cur_flow;
  logic [DATA_W-1:0] resp_w0, resp_w1;
  wbus_t out_bus;
  wbus_t expw [$];
  int    n_alert = 0;

  alert_gen #(.MAX_RIDS(MAXR)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_bus.en && !out_stop) begin
      wbus_t e;
      checks++;
      e = expw.pop_front();
      if (out_bus !== e) begin failures++; $display("FAIL: got %p exp %p", out_bus, e); end
    end
    if (ev_alert) n_alert++;
    out_stop <= ($urandom_range(3) == 0);
  end

  function automatic wbus_t wd(bit s, bit e, logic [31:0] d, int vb);
    wbus_t w;
    w = '0; w.en = 1; w.sod = s; w.eod = e; w.data = d; w.vb = VB_W'(vb);
    return w;
  endfunction

  task automatic send(tok_t t);
    @(negedge clk); in_valid = 1; in_tok = t;
    #1; while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask

  initial begin
    tok_t t;
    int n_exp_alert = 0;
    in_valid = 0; in_tok = '0; resp_valid = 0; resp_w0 = '0; resp_w1 = '0; out_stop = 0; cur_flow = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 24; p++) begin
      automatic int n = p % 12;
      automatic int rids [$];
      cur_flow = FLOW_W'(100 + p);
      for (int k = 0; k < n; k++) begin
        rids.push_back(1000 * p + k);
        t = '0; t.kind = TK_ID; t.id = ID_W'(1000 * p + k); send(t);
      end
      if (n > 0) begin
        automatic int m = (n > int'(MAXR)) ? MAXR : n;
        n_exp_alert++;
        expw.push_back(wd(1, 0, {FLAG_ALERT | ((n > int'(MAXR)) ? FLAG_AOVF : 16'h0), 16'(100 + p)}, 4));
        for (int k = 0; k < m; k += 2) begin
          automatic bit two = (k + 1 < m);
          expw.push_back(wd(0, k + 2 >= m, {16'(rids[k]), two ? 16'(rids[k+1]) : 16'h0}, two ? 4 : 2));
        end
      end
      t = '0; t.kind = TK_EOM; send(t);
      if (p == 5) begin
        @(negedge clk); resp_valid = 1; resp_w0 = 32'hC2000123; resp_w1 = 32'hDEADBEEF;
        expw.push_back(wd(1, 0, 32'hC2000123, 4)); expw.push_back(wd(0, 1, 32'hDEADBEEF, 4));
        #1; while (!resp_ready) begin @(negedge clk); #1; end
        @(posedge clk); #1 resp_valid = 0;
      end
    end
    wait (expw.size() == 0 && idle);
    repeat (3) @(posedge clk);
    checks++; if (n_alert != n_exp_alert) begin failures++; $display("FAIL: %0d alerts exp %0d", n_alert, n_exp_alert); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
