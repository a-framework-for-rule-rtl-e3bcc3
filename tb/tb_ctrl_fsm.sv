// tb_ctrl_fsm: control FSM with model SRAM banks and a model count RAM.
// Sends write and read commands for both SRAM banks, the required-count RAM,
// the configuration register, an event counter and the two frequent-CID
// tables. Checks that the memories hold what was written, each read returns
// the right response, the header-check enable follows the configuration
// write, and no access happens before the pipeline reports idle (hold stays
// high meanwhile).
module tb_ctrl_fsm;
  import rp_pkg::*;
  localparam int unsigned NR = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  wbus_t c_in;
  logic c_stop, hold, idle, sa_en, sa_we, sb_en, sb_we, q_we, hdr_check_en, f_cam_we, f_tab_we;
  logic [SRAM_DW-1:0] fcam_d = '0, ftab_d = '0;
  logic [SRAM_AW-1:0] fcam_a = '0, ftab_a = '0;
  int   n_fcam = 0, n_ftab = 0;
  logic resp_valid, resp_ready;
  logic [SRAM_AW-1:0] s_addr;
  logic [SRAM_DW-1:0] s_wdata, sa_rdata, sb_rdata;
  logic [$clog2(NR)-1:0] q_addr;
  logic [CNT_W-1:0] q_wdata, q_rdata;
  logic [NUM_EV-1:0][31:0] ev_cnt;
  logic [DATA_W-1:0] resp_w0, resp_w1;
  logic [CNT_W-1:0] qmem [NR];
  int   n_early = 0;

  ctrl_fsm #(.NUM_RULE(NR)) dut (.*);
  zbt_sram_model #(.DEPTH(1024)) bank_a (.clk, .en(sa_en), .we(sa_we), .addr(s_addr), .wdata(s_wdata), .rdata(sa_rdata));
  zbt_sram_model #(.DEPTH(1024)) bank_b (.clk, .en(sb_en), .we(sb_we), .addr(s_addr), .wdata(s_wdata), .rdata(sb_rdata));

  assign q_rdata = qmem[q_addr];
  always @(posedge clk) if (q_we) qmem[q_addr] <= q_wdata;
  always @(posedge clk) if (f_cam_we) begin n_fcam++; fcam_a <= s_addr; fcam_d <= s_wdata; end
  always @(posedge clk) if (f_tab_we) begin n_ftab++; ftab_a <= s_addr; ftab_d <= s_wdata; end
  always @(posedge clk) if (rst_n && (sa_en || sb_en || q_we) && !idle) n_early++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(bit s, bit e, logic [31:0] d);
    @(negedge clk);
    c_in = '0; c_in.en = 1; c_in.sod = s; c_in.eod = e; c_in.data = d; c_in.vb = 4;
    #1; while (c_stop) begin @(negedge clk); #1; end
    @(posedge clk); #1 c_in = '0;
  endtask

  task automatic cmd(op_e op, int addr, logic [35:0] data);
    put(1, 0, {op, data[35:32], 6'b0, SRAM_AW'(addr)});
    put(0, 1, data[31:0]);
  endtask

  task automatic expect_resp(op_e op, int addr, logic [35:0] data);
    @(negedge clk); resp_ready = 1;
    #1; while (!resp_valid) begin @(negedge clk); #1; end
    checks++;
    if (resp_w0 != {RESP_TAG, data[35:32], 6'b0, SRAM_AW'(addr)} || resp_w1 != data[31:0]) begin
      failures++; $display("FAIL: resp %h %h for op %0d", resp_w0, resp_w1, op);
    end
    @(posedge clk); #1 resp_ready = 0;
  endtask

  initial begin
    c_in = '0; idle = 1; resp_ready = 0;
    for (int k = 0; k < NUM_EV; k++) ev_cnt[k] = 32'(1000 + k);
    for (int k = 0; k < int'(NR); k++) qmem[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++; if (!hdr_check_en) begin failures++; $display("FAIL: reset cfg"); end
    cmd(OP_WR_A, 12'h123, 36'h912345678);
    cmd(OP_WR_B, 12'h045, 36'h3CAFEF00D);
    repeat (3) @(posedge clk);
    checks++; if (bank_a.mem[12'h123] != 36'h912345678) begin failures++; $display("FAIL: bank A write"); end
    checks++; if (bank_b.mem[12'h045] != 36'h3CAFEF00D) begin failures++; $display("FAIL: bank B write"); end
    cmd(OP_RD_A, 12'h123, '0); expect_resp(OP_RD_A, 12'h123, 36'h912345678);
    cmd(OP_RD_B, 12'h045, '0); expect_resp(OP_RD_B, 12'h045, 36'h3CAFEF00D);
    cmd(OP_WR_REQ, 42, 36'd7);
    repeat (3) @(posedge clk);
    checks++; if (qmem[42] != 7) begin failures++; $display("FAIL: req write"); end
    cmd(OP_RD_REQ, 42, '0); expect_resp(OP_RD_REQ, 42, 36'd7);
    cmd(OP_WR_CFG, 0, 36'd0);
    repeat (3) @(posedge clk);
    checks++; if (hdr_check_en) begin failures++; $display("FAIL: cfg 0"); end
    cmd(OP_WR_CFG, 0, 36'd1);
    repeat (3) @(posedge clk);
    checks++; if (!hdr_check_en) begin failures++; $display("FAIL: cfg 1"); end
    cmd(OP_RD_EVT, 3, '0); expect_resp(OP_RD_EVT, 3, 36'd1003);
    cmd(OP_RD_EVT, 10, '0); expect_resp(OP_RD_EVT, 10, 36'd1010);
    // frequent-CID unit writes: one strobe each, address and data on s_*
    cmd(OP_WR_FCAM, 5, 36'h8ABC_0123);
    cmd(OP_WR_FTAB, 700, 36'h1_2345_6789);
    repeat (3) @(posedge clk);
    checks++; if (n_fcam != 1 || fcam_a != 5 || fcam_d != 36'h8ABC_0123) begin failures++; $display("FAIL: CAM write %0d %h %h", n_fcam, fcam_a, fcam_d); end
    checks++; if (n_ftab != 1 || ftab_a != 700 || ftab_d != 36'h1_2345_6789) begin failures++; $display("FAIL: table write %0d %h %h", n_ftab, ftab_a, ftab_d); end
    // access waits for an idle pipeline
    @(negedge clk); idle = 0;
    cmd(OP_WR_A, 12'h200, 36'h1);
    repeat (20) @(posedge clk);
    checks++; if (!hold || bank_a.mem[12'h200] != 0) begin failures++; $display("FAIL: wrote while busy"); end
    @(negedge clk); idle = 1;
    repeat (3) @(posedge clk);
    checks++; if (hold || bank_a.mem[12'h200] != 1) begin failures++; $display("FAIL: write after idle"); end
    checks++; if (n_early != 0) begin failures++; $display("FAIL: early access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
