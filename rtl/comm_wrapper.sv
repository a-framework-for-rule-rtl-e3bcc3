// comm_wrapper: communication wrapper between two modules of the framework.
//
// Every module hands its data on through a wrapper carrying the framework's
// standard signals: sod (start of a data stream), eod (end of it), en (a word
// is present), data, vb (valid bytes in data) and the busy signal stop that
// halts the sender during a backlog. This wrapper decouples the two sides with
// a FIFO, so a module placed in another device or FPGA region can answer stop
// late without losing words. A word moves on a side in every cycle where en is
// high and that side's stop is low; stop towards the sender is raised when the
// FIFO is full. The signal set follows the framework; the FIFO depth and the
// same-cycle meaning of stop are this design's choices. Assertions check that
// sod and eod only appear on enabled words and that vb never exceeds 4.
module comm_wrapper
  import rp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  wbus_t in_bus,     // from the sending module
  output logic  in_stop,    // busy towards the sender
  output wbus_t out_bus,    // to the receiving module
  input  logic  out_stop    // busy from the receiver
);
  localparam int unsigned W = 2 + DATA_W + VB_W;

  logic         full, empty;
  logic [W-1:0] dout;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (in_bus.en),
    .din  ({in_bus.sod, in_bus.eod, in_bus.data, in_bus.vb}),
    .full,
    .pop  (!out_stop),
    .dout, .empty, .count
  );

  assign in_stop = full;

  always_comb begin
    out_bus     = '0;
    out_bus.en  = !empty;
    {out_bus.sod, out_bus.eod, out_bus.data, out_bus.vb} = dout;
    if (empty) begin
      out_bus.sod = 1'b0;
      out_bus.eod = 1'b0;
    end
  end

  // Bus rules.
  a_sod_en: assert property (@(posedge clk) disable iff (!rst_n) in_bus.sod |-> in_bus.en);
  a_eod_en: assert property (@(posedge clk) disable iff (!rst_n) in_bus.eod |-> in_bus.en);
  a_vb_max: assert property (@(posedge clk) disable iff (!rst_n) in_bus.en |-> in_bus.vb <= 3'd4);
endmodule
