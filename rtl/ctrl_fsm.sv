// ctrl_fsm: control FSM of stage 1.
//
// Software programs the rule processor with control messages: it reads and
// writes both SRAM banks and the required-count block RAM, sets the
// configuration register and reads the event counters. A control message is
// two wrapper words: word 0 = {op[3:0], data[35:32], 6'b0, addr[17:0]},
// word 1 = data[31:0] (opcodes in rp_pkg::op_e). A single-word message is taken
// with data 0. Before touching any memory the FSM raises hold, which keeps
// stage 1 from starting a new ID message, and waits for idle, which says the
// whole pipeline is empty; the access then takes the SRAM port (one cycle for a
// write, a read returns the word one cycle after the address) or the block RAM
// port (read without delay). OP_WR_FCAM and OP_WR_FTAB write an entry or a
// table word of the frequent-CID unit (strobes f_cam_we / f_tab_we with
// s_addr / s_wdata, one cycle). Every read is answered with a two-word response
// of the same layout, the top nibble of word 0 set to RESP_TAG, through the
// alert path. Configuration bit 0 enables the header check of stage 5 (after
// reset: enabled). The set of operations follows the document; the message
// layout, opcodes and the drain-before-access rule are this design's choices.
module ctrl_fsm
  import rp_pkg::*;
#(
  parameter int unsigned NUM_RULE = 32768
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // control messages
  input  wbus_t                       c_in,
  output logic                        c_stop,
  // pipeline drain
  output logic                        hold,
  input  logic                        idle,
  // SRAM bank A and B access (priority over the pipeline)
  output logic                        sa_en, sa_we,
  output logic                        sb_en, sb_we,
  output logic [SRAM_AW-1:0]          s_addr,
  output logic [SRAM_DW-1:0]          s_wdata,
  input  logic [SRAM_DW-1:0]          sa_rdata,
  input  logic [SRAM_DW-1:0]          sb_rdata,
  // required-count block RAM
  output logic                        f_cam_we, f_tab_we,   // frequent-CID unit
  output logic                        q_we,
  output logic [$clog2(NUM_RULE)-1:0] q_addr,
  output logic [CNT_W-1:0]            q_wdata,
  input  logic [CNT_W-1:0]            q_rdata,
  // configuration and events
  output logic                        hdr_check_en,
  input  logic [NUM_EV-1:0][31:0]     ev_cnt,
  // responses
  output logic                        resp_valid,
  output logic [DATA_W-1:0]           resp_w0,
  output logic [DATA_W-1:0]           resp_w1,
  input  logic                        resp_ready
);
  typedef enum logic [2:0] {S_W0, S_W1, S_HOLD, S_EXEC, S_RDWAIT, S_RESP} state_e;

  state_e               state;
  op_e                  op;
  logic [SRAM_AW-1:0]   addr;
  logic [SRAM_DW-1:0]   data;
  logic [SRAM_DW-1:0]   rdata;

  assign c_stop = !(state == S_W0 || state == S_W1);
  assign hold   = (state == S_HOLD || state == S_EXEC || state == S_RDWAIT);

  // Memory strobes in S_EXEC.
  always_comb begin
    sa_en = 1'b0; sa_we = 1'b0; sb_en = 1'b0; sb_we = 1'b0; q_we = 1'b0;
    f_cam_we = 1'b0; f_tab_we = 1'b0;
    if (state == S_EXEC) begin
      sa_en = (op == OP_WR_A) || (op == OP_RD_A);
      sa_we = (op == OP_WR_A);
      sb_en = (op == OP_WR_B) || (op == OP_RD_B);
      sb_we = (op == OP_WR_B);
      q_we  = (op == OP_WR_REQ);
      f_cam_we = (op == OP_WR_FCAM);
      f_tab_we = (op == OP_WR_FTAB);
    end
  end
  assign s_addr  = addr;
  assign s_wdata = data;
  assign q_addr  = addr[$clog2(NUM_RULE)-1:0];
  assign q_wdata = data[CNT_W-1:0];

  assign resp_valid = (state == S_RESP);
  assign resp_w0    = {RESP_TAG, rdata[35:32], 6'b0, addr};
  assign resp_w1    = rdata[31:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_W0;
      op           <= OP_NOP;
      addr         <= '0;
      data         <= '0;
      rdata        <= '0;
      hdr_check_en <= 1'b1;
    end else begin
      unique case (state)
        S_W0: if (c_in.en && c_in.sod) begin
          op   <= op_e'(c_in.data[31:28]);
          addr <= c_in.data[SRAM_AW-1:0];
          data <= {c_in.data[27:24], 32'h0};
          state <= c_in.eod ? S_HOLD : S_W1;
        end
        S_W1: if (c_in.en) begin
          data[31:0] <= c_in.data;
          state <= c_in.eod ? S_HOLD : S_W1;   // extra words are ignored
        end
        S_HOLD: if (idle) state <= S_EXEC;
        S_EXEC: begin
          unique case (op)
            OP_RD_A, OP_RD_B: state <= S_RDWAIT;
            OP_RD_REQ: begin
              rdata <= {{(SRAM_DW-CNT_W){1'b0}}, q_rdata};
              state <= S_RESP;
            end
            OP_RD_EVT: begin
              rdata <= {4'h0, ev_cnt[(addr < SRAM_AW'(NUM_EV)) ? addr[3:0] : 4'd0]};
              state <= S_RESP;
            end
            OP_WR_CFG: begin
              hdr_check_en <= data[0];
              state <= S_W0;
            end
            default: state <= S_W0;
          endcase
        end
        S_RDWAIT: begin
          rdata <= (op == OP_RD_A) ? sa_rdata : sb_rdata;
          state <= S_RESP;
        end
        S_RESP: if (resp_ready) state <= S_W0;
        default: state <= S_W0;
      endcase
    end
  end
endmodule
