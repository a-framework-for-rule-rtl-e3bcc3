// ctx_mem_model: behavioural model of the off-chip context memory (SDRAM),
// for simulation only. Requests are granted at random (about three in four
// cycles); a granted read returns its word LAT cycles later with rvalid. Words
// never written read as zero. Counts of reads and writes are kept.
module ctx_mem_model
  import rp_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic             clk,
  input  logic             req,
  input  logic             we,
  input  logic [SD_AW-1:0] addr,
  input  logic [SD_DW-1:0] wdata,
  output logic             gnt,
  output logic             rvalid,
  output logic [SD_DW-1:0] rdata
);
  logic [SD_DW-1:0] mem [int];
  logic [SD_DW-1:0] pipe_d [LAT];
  logic             pipe_v [LAT];
  int               n_wr = 0, n_rd = 0;

  initial begin
    gnt = 1'b0;
    for (int i = 0; i < int'(LAT); i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
  end
  assign rvalid = pipe_v[LAT-1];
  assign rdata  = pipe_d[LAT-1];

  always @(posedge clk) begin
    for (int i = int'(LAT) - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= req && gnt && !we;
    pipe_d[0] <= mem.exists(int'(addr)) ? mem[int'(addr)] : '0;
    if (req && gnt && we) begin
      mem[int'(addr)] = wdata;
      n_wr++;
    end
    if (req && gnt && !we) n_rd++;
    gnt <= ($urandom_range(3) != 0);
  end
endmodule
