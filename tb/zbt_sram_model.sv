// zbt_sram_model: behavioural model of one off-chip ZBT SRAM bank, for
// simulation only. A read returns the addressed word one cycle after the
// address (en high, we low); a write stores wdata when en and we are high.
// The model starts all-zero. Backdoor access from testbenches goes through
// the mem array.
module zbt_sram_model
  import rp_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << SRAM_AW
) (
  input  logic               clk,
  input  logic               en,
  input  logic               we,
  input  logic [SRAM_AW-1:0] addr,
  input  logic [SRAM_DW-1:0] wdata,
  output logic [SRAM_DW-1:0] rdata
);
  logic [SRAM_DW-1:0] mem [DEPTH];
  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    rdata = '0;
  end
  always @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
    if (en && !we) rdata <= mem[addr];
  end
endmodule
