// tb_comm_wrapper: sends 300 words with random sod/eod/vb through the wrapper
// while the receiver raises stop at random; checks every word arrives once,
// in order and unchanged, and that stop towards the sender rises when the
// FIFO is full.
module tb_comm_wrapper;
  import rp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  wbus_t in_bus, out_bus;
  logic  in_stop, out_stop;
  wbus_t sent [$];
  int    n_sent = 0, n_recv = 0, n_full = 0;

  comm_wrapper #(.DEPTH(8)) dut (.clk, .rst_n, .in_bus, .in_stop, .out_bus, .out_stop);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  always @(posedge clk) if (rst_n) begin
    if (out_bus.en && !out_stop) begin
      wbus_t e;
      e = sent.pop_front();
      checks++;
      if (out_bus !== e) begin
        failures++;
        $display("FAIL word %0d: got %h exp %h", n_recv, out_bus, e);
      end
      n_recv++;
    end
    if (in_stop) n_full++;
    out_stop <= (n_sent < 150) ? ($urandom_range(9) < 7) : ($urandom_range(9) < 2);
  end

  initial begin
    in_bus = '0; out_stop = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_sent < 300) begin
      @(negedge clk);
      in_bus = '0;
      if ($urandom_range(3) != 0 && !in_stop) begin
        in_bus.en   = 1'b1;
        in_bus.sod  = (n_sent % 5 == 0);
        in_bus.eod  = (n_sent % 5 == 4);
        in_bus.data = $urandom;
        in_bus.vb   = 3'($urandom_range(4));
        sent.push_back(in_bus);
        n_sent++;
      end
    end
    @(negedge clk) in_bus = '0;
    wait (n_recv == 300);
    repeat (5) @(posedge clk);
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: stop never raised"); end
    checks++;
    if (sent.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
