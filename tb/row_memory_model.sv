// row_memory_model: behavioural model of the genotype/phenotype memory
// (the per-board DRAM) as seen by the CBM: words of one configuration row,
// a write in the clock of the request, read data one clock after a read
// request. Unwritten words read as zero. Simulation only.
module row_memory_model
  import cbm_pkg::*;
#(
  parameter int unsigned LANES = 144,
  parameter int unsigned WORDS = 1024,
  parameter int unsigned AW    = 32
) (
  input  logic          clk,
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_addr,
  input  cell_cfg_t     mem_wdata [LANES],
  output cell_cfg_t     mem_rdata [LANES]
);
  cell_cfg_t mem [WORDS][LANES];
  int        writes = 0;

  initial
    for (int a = 0; a < int'(WORDS); a++)
      for (int l = 0; l < int'(LANES); l++) mem[a][l] = '0;

  always @(posedge clk) begin
    if (mem_req && mem_we) begin
      for (int l = 0; l < int'(LANES); l++) mem[mem_addr % WORDS][l] <= mem_wdata[l];
      writes <= writes + 1;
    end
    if (mem_req && !mem_we)
      for (int l = 0; l < int'(LANES); l++) mem_rdata[l] <= mem[mem_addr % WORDS][l];
  end
endmodule
