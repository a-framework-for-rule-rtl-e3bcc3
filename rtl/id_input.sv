// id_input: ID interface of stage 1 (input FIFO and message parser).
//
// Header and content modules report matches as messages on the wrapper bus:
// word 0 = {flags[15:0], flow_id[15:0]}, followed by the matching IDs packed
// two per word, ID 1 in bits 31:16 and ID 2 in bits 15:0 (vb = 2 on a last
// word holding a single ID). Flag bit 0 (FLAG_HEADER) marks a message of
// header IDs; otherwise the IDs are content IDs. Words are buffered in a FIFO
// that also serves as flow control (stop = FIFO full). The parser then forks
// the IDs, one per cycle: CIDs go to stage 2 as tokens, HIDs go straight to
// stage 5. After the last ID an end-of-message token follows the CIDs so that
// stage 7 knows when a packet's matches are complete.
//
// Context switch: when a message belongs to a different flow than the one
// loaded, or is a header message of flow 0 (stateless traffic: each packet
// starts from empty state, its header message coming first), the parser waits until stages 2-7 are empty (pipe_idle), asks the
// context storage to swap flows (ctx_req until ctx_done) and only then
// continues. While hold is high (control access) no new message is started.
// at_boundary tells the control FSM that no message is being parsed. Words
// arriving outside a message are dropped. The fork of CIDs and HIDs and the
// FIFO follow the document; the word layout details and FIFO depth are this
// design's choices.
module id_input
  import rp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  wbus_t             id_in,
  output logic              id_stop,
  // CID tokens to stage 2
  output logic              c_valid,
  output tok_t              c_tok,
  input  logic              c_ready,
  // HIDs to stage 5
  output logic              h_valid,
  output logic [ID_W-1:0]   h_id,
  input  logic              h_ready,
  // context switch
  input  logic              pipe_idle,
  output logic              ctx_req,
  output logic              ctx_old_valid,
  output logic [FLOW_W-1:0] ctx_old_flow,
  output logic [FLOW_W-1:0] ctx_new_flow,
  input  logic              ctx_done,
  output logic [FLOW_W-1:0] cur_flow,
  // control
  input  logic              hold,
  output logic              at_boundary,
  output logic              ev_id     // one ID handed on
);
  localparam int unsigned W = 2 + DATA_W + VB_W;

  typedef enum logic [2:0] {P_HDR, P_WAIT, P_SWITCH, P_HI, P_LO, P_EOM} pstate_e;

  pstate_e            state;
  logic               full, empty, pop;
  logic [W-1:0]       dout;
  wbus_t              w;
  logic [$clog2(FIFO_DEPTH+1)-1:0] count;
  logic               is_hdr;      // current message carries HIDs
  logic               eod_hdr;     // message had no IDs
  logic               cur_valid;
  logic [FLOW_W-1:0]  new_flow;
  logic [15:0]        cur_id;
  logic               id_valid, id_take;

  sync_fifo #(.WIDTH(W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (id_in.en),
    .din  ({id_in.sod, id_in.eod, id_in.data, id_in.vb}),
    .full,
    .pop,
    .dout, .empty, .count
  );
  assign id_stop = full;

  always_comb begin
    w = '0;
    {w.sod, w.eod, w.data, w.vb} = dout;
    w.en = !empty;
  end

  // The ID on offer this cycle and whether its consumer takes it.
  always_comb begin
    id_valid = 1'b0;
    cur_id   = '0;
    if (state == P_HI && w.en) begin
      id_valid = (w.vb != '0);
      cur_id   = w.data[31:16];
    end else if (state == P_LO && w.en) begin
      id_valid = 1'b1;
      cur_id   = w.data[15:0];
    end
  end

  assign h_valid = id_valid && is_hdr;
  assign h_id    = cur_id[ID_W-1:0];

  always_comb begin
    c_valid = 1'b0;
    c_tok   = '0;
    if (id_valid && !is_hdr) begin
      c_valid     = 1'b1;
      c_tok.kind  = TK_ID;
      c_tok.id    = cur_id[ID_W-1:0];
    end else if (state == P_EOM) begin
      c_valid     = 1'b1;
      c_tok.kind  = TK_EOM;
    end
  end

  assign id_take = id_valid && (is_hdr ? h_ready : c_ready);
  assign ev_id   = id_take;

  // Pop: header word when accepted; body word once its last ID is taken.
  always_comb begin
    pop = 1'b0;
    unique case (state)
      P_HDR: pop = w.en && !hold;
      P_HI:  pop = w.en && (w.vb <= 3'd2) && (id_take || !id_valid);
      P_LO:  pop = id_take;
      default: pop = 1'b0;
    endcase
  end

  assign ctx_req       = (state == P_SWITCH);
  assign ctx_old_valid = cur_valid;
  assign ctx_old_flow  = cur_flow;
  assign ctx_new_flow  = new_flow;
  assign at_boundary   = (state == P_HDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_HDR;
      is_hdr    <= 1'b0;
      eod_hdr   <= 1'b0;
      cur_valid <= 1'b0;
      cur_flow  <= '0;
      new_flow  <= '0;
    end else begin
      unique case (state)
        P_HDR: if (w.en && !hold && w.sod) begin
          is_hdr   <= (w.data[31:16] & FLAG_HEADER) != 16'h0;
          new_flow <= w.data[FLOW_W-1:0];
          eod_hdr  <= w.eod;
          if (!cur_valid || w.data[FLOW_W-1:0] != cur_flow ||
              (w.data[FLOW_W-1:0] == '0 && (w.data[31:16] & FLAG_HEADER) != 16'h0))
            state <= P_WAIT;
          else
            state <= w.eod ? P_EOM : P_HI;
        end
        P_WAIT:   if (pipe_idle) state <= P_SWITCH;
        P_SWITCH: if (ctx_done) begin
          cur_valid <= 1'b1;
          cur_flow  <= new_flow;
          state     <= eod_hdr ? P_EOM : P_HI;
        end
        P_HI: if (pop) state <= w.eod ? P_EOM : P_HI;
              else if (id_take) state <= P_LO;
        P_LO: if (pop) state <= w.eod ? P_EOM : P_HI;
        P_EOM: if (c_ready) state <= P_HDR;
        default: state <= P_HDR;
      endcase
    end
  end
endmodule
