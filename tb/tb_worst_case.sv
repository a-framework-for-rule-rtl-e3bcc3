// tb_worst_case: the rule processor's worst-case workload at full size.
// The slowest input for the rule processor is a stream of minimum-size TCP
// packets, each from a different flow, whose four payload bytes hold the
// signature found in the most rules (|00 00 00 00|, in 135 Snort rules). This
// test builds that case: 135 rules share one CID (7), each with that CID as its
// only signature and one of 27 header rules (HIDs 200..226, five rules each).
// Eight flows take turns, so every packet forces a context switch. Packet p
// belongs to flow f = 1 + p mod 8 and has two matching headers, 200 + f and
// 209 + f, so ten of the 135 rules must fire on every packet.
// The same 48 packets are run twice, each time sent back to back:
//   run 0: CID 7 is walked through its 135-node list in SRAM bank A;
//   run 1: CID 7 is loaded into the frequent-CID unit, grouped by header.
// Every alert must hold exactly the ten expected RIDs (in any order). The cycles
// from the first word sent to the last alert are printed for both runs. Run 0
// must take at least 135 cycles per packet (one per list node), and run 1
// must be faster than run 0.
module tb_worst_case;
  import rp_pkg::*;
  localparam int W = 7, NR = 135, NH = 27, NPKT = 48;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ alert monitor
  typedef int iq_t [$];
  iq_t  exp_q [$];
  int   n_alert = 0, n_resp = 0;
  longint last_alert = 0;
  bit   is_resp = 0;
  int   cur [$];
  iq_t  e_cur;
  logic [15:0] cur_fl;

  always @(posedge clk) if (rst_n && alert_out.en && !alert_stop) begin
    if (alert_out.sod) begin
      is_resp = (alert_out.data[31:28] == RESP_TAG);
      cur = {};
      cur_fl = alert_out.data[15:0];
    end else if (!is_resp) begin
      cur.push_back(int'(alert_out.data[31:16]));
      if (alert_out.vb == 4) cur.push_back(int'(alert_out.data[15:0]));
    end
    if (alert_out.eod) begin
      if (is_resp) n_resp++;
      else begin
        n_alert++;
        last_alert = longint'($time / 10);
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected alert flow %0d", cur_fl); end
        else begin
          e_cur = exp_q.pop_front();
          cur.sort();
          if (e_cur != cur) begin failures++; $display("FAIL: alert flow %0d rids %p expected %p", cur_fl, cur, e_cur); end
        end
      end
    end
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

  // a control read answers after every earlier command has been done
  task automatic sync_ctl();
    int n = n_resp;
    cmd(OP_RD_EVT, 0, '0);
    wait (n_resp == n + 1);
  endtask

  task automatic id_word(bit s, bit e, logic [31:0] d, int vb);
    @(negedge clk);
    id_in = '0; id_in.en = 1; id_in.sod = s; id_in.eod = e; id_in.data = d; id_in.vb = VB_W'(vb);
    #1; while (id_stop) begin @(negedge clk); #1; end
    @(posedge clk); #1 id_in = '0;
  endtask

  function automatic logic [35:0] node(bit v, int id, bit nv, int nx);
    node_t n;
    n = '{valid: v, id: ID_W'(id), nvalid: nv, next: SRAM_AW'(nx)};
    return SRAM_DW'(n);
  endfunction

  function automatic int rid_of(int i); return 1000 + i; endfunction
  function automatic int hid_of(int i); return 200 + (i % NH); endfunction

  // one packet: header message with two HIDs, content message with CID 7
  task automatic packet(int p);
    int f = 1 + (p % 8);
    iq_t e;
    for (int i = 0; i < NR; i++)
      if (hid_of(i) == 200 + f || hid_of(i) == 209 + f) e.push_back(rid_of(i));
    e.sort();
    exp_q.push_back(e);
    id_word(1, 0, {FLAG_HEADER, 16'(f)}, 4);
    id_word(0, 1, {16'(200 + f), 16'(209 + f)}, 4);
    id_word(1, 0, {16'h0, 16'(f)}, 4);
    id_word(0, 1, {16'(W), 16'h0}, 2);
  endtask

  initial begin
    longint t0 [2], t1 [2];
    id_in = '0; ctl_in = '0; alert_stop = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // bank A: the list of CID 7, head at address 7, further nodes from 40000
    for (int i = 0; i < NR; i++)
      cmd(OP_WR_A, (i == 0) ? W : 40000 + i - 1, node(1, rid_of(i), i < NR - 1, 40000 + i));
    // bank B: rule words and one-node CID lists from 50000; required count 1
    for (int i = 0; i < NR; i++) begin
      cmd(OP_WR_B, rid_of(i), node(1, hid_of(i), 1, 50000 + i));
      cmd(OP_WR_B, 50000 + i, node(1, W, 0, 0));
      cmd(OP_WR_REQ, rid_of(i), 36'd1);
    end
    sync_ctl();

    for (int run = 0; run < 2; run++) begin
      if (run == 1) begin
        // frequent-CID entry 0: CID 7, table from 0; 27 groups of five RIDs
        int a = 0;
        cmd(OP_WR_FCAM, 0, 36'({1'b1, ID_W'(W), 16'd0}));
        for (int g = 0; g < NH; g++) begin
          cmd(OP_WR_FTAB, a, 36'({g == NH - 1, 1'b1, 8'd5, ID_W'(200 + g)})); a++;
          for (int k = 0; k < 5; k++) begin
            cmd(OP_WR_FTAB, a, 36'({g == NH - 1 && k == 4, 1'b0, 8'd0, ID_W'(rid_of(g + NH * k))})); a++;
          end
        end
        sync_ctl();
      end
      repeat (5) @(posedge clk);
      t0[run] = longint'($time / 10);
      for (int p = 0; p < NPKT; p++) packet(p);
      wait (exp_q.size() == 0);
      t1[run] = last_alert;
      $display("run %0d (%s): %0d packets in %0d cycles, %0d cycles per packet", run,
               run == 0 ? "list walk" : "frequent-CID unit", NPKT, t1[run] - t0[run], (t1[run] - t0[run]) / NPKT);
      repeat (20) @(posedge clk);
    end
    checks++;
    if (n_alert != 2 * NPKT) begin failures++; $display("FAIL: %0d alerts, expected %0d", n_alert, 2 * NPKT); end
    checks++;
    if (t1[0] - t0[0] < longint'(NR * NPKT)) begin failures++; $display("FAIL: list walk faster than one cycle per node"); end
    checks++;
    if (t1[1] - t0[1] >= t1[0] - t0[0]) begin failures++; $display("FAIL: frequent-CID unit not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
