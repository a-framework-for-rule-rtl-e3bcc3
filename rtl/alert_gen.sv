// alert_gen: stage 7, alert output.
//
// Matched rule IDs of one ID message (one packet seen by one module) are
// collected in a list; when the end-of-message token arrives the list is sent
// to the control host as a single alert message on the wrapper bus:
// word 0 = {flags, flow_id} with FLAG_ALERT set, then the RIDs two per word
// (16 bits each, first RID in bits 31:16, vb = 2 when the last word holds one).
// A message that matched nothing produces no alert. When more than MAX_RIDS
// rules match, the rest are not listed and FLAG_AOVF is set. Responses of the
// control FSM (two words each) share the output; they are taken only while no
// alert is being collected or sent. Bundling the RIDs of a packet into one
// message follows the document; the layout, list size and overflow handling
// are this design's choices.
//
// Timing: one token per cycle while collecting; tokens are held off
// (in_ready low) while a message is being sent, one word per cycle unless
// out_stop is high.
module alert_gen
  import rp_pkg::*;
#(
  parameter int unsigned MAX_RIDS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  tok_t              in_tok,
  output logic              in_ready,
  input  logic [FLOW_W-1:0] cur_flow,
  input  logic              resp_valid,
  input  logic [DATA_W-1:0] resp_w0,
  input  logic [DATA_W-1:0] resp_w1,
  output logic              resp_ready,
  output wbus_t             out_bus,
  input  logic              out_stop,
  output logic              ev_alert,
  output logic              idle
);
  localparam int unsigned NW = $clog2(MAX_RIDS + 1);

  typedef enum logic [2:0] {A_COLLECT, A_HDR, A_BODY, A_RESP0, A_RESP1} astate_e;

  astate_e           state;
  logic [ID_W-1:0]   rids [MAX_RIDS];
  logic [NW-1:0]     n, idx;
  logic              ovf;
  logic [FLOW_W-1:0] flow;
  logic [DATA_W-1:0] r0, r1;
  logic              fire, last;
  logic [15:0]       first_rid, second_rid;

  assign resp_ready = (state == A_COLLECT) && (n == '0) && !ovf;
  assign in_ready   = (state == A_COLLECT) && !(resp_valid && resp_ready);
  assign fire       = in_valid && in_ready;
  assign idle       = (state == A_COLLECT) && (n == '0) && !ovf;
  assign last       = (32'(idx) + 2 >= 32'(n));
  assign first_rid  = 16'(rids[idx[$clog2(MAX_RIDS)-1:0]]);
  assign second_rid = (32'(idx) + 1 < 32'(n)) ? 16'(rids[$clog2(MAX_RIDS)'(idx + 1'b1)]) : 16'h0;
  assign ev_alert   = (state == A_HDR) && !out_stop;

  always_comb begin
    out_bus = '0;
    unique case (state)
      A_HDR: begin
        out_bus.en   = 1'b1;
        out_bus.sod  = 1'b1;
        out_bus.eod  = (n == '0);
        out_bus.data = {FLAG_ALERT | (ovf ? FLAG_AOVF : 16'h0), flow};
        out_bus.vb   = 3'd4;
      end
      A_BODY: begin
        out_bus.en   = 1'b1;
        out_bus.eod  = last;
        out_bus.data = {first_rid, second_rid};
        out_bus.vb   = (32'(idx) + 1 < 32'(n)) ? 3'd4 : 3'd2;
      end
      A_RESP0: begin
        out_bus.en   = 1'b1;
        out_bus.sod  = 1'b1;
        out_bus.data = r0;
        out_bus.vb   = 3'd4;
      end
      A_RESP1: begin
        out_bus.en   = 1'b1;
        out_bus.eod  = 1'b1;
        out_bus.data = r1;
        out_bus.vb   = 3'd4;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (fire && in_tok.kind == TK_ID && 32'(n) < MAX_RIDS)
      rids[n[$clog2(MAX_RIDS)-1:0]] <= in_tok.id;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_COLLECT;
      n     <= '0;
      idx   <= '0;
      ovf   <= 1'b0;
      flow  <= '0;
      r0    <= '0;
      r1    <= '0;
    end else begin
      unique case (state)
        A_COLLECT: begin
          if (resp_valid && resp_ready) begin
            r0    <= resp_w0;
            r1    <= resp_w1;
            state <= A_RESP0;
          end else if (fire && in_tok.kind == TK_ID) begin
            if (32'(n) < MAX_RIDS) n <= n + 1'b1;
            else                   ovf <= 1'b1;
          end else if (fire) begin           // end of message
            flow <= cur_flow;
            if (n != '0 || ovf) state <= A_HDR;
          end
        end
        A_HDR: if (!out_stop) begin
          idx   <= '0;
          state <= (n == '0) ? A_COLLECT : A_BODY;
          if (n == '0) ovf <= 1'b0;
        end
        A_BODY: if (!out_stop) begin
          idx <= idx + NW'(2);
          if (last) begin
            n     <= '0;
            ovf   <= 1'b0;
            state <= A_COLLECT;
          end
        end
        A_RESP0: if (!out_stop) state <= A_RESP1;
        A_RESP1: if (!out_stop) state <= A_COLLECT;
        default: state <= A_COLLECT;
      endcase
    end
  end
endmodule
