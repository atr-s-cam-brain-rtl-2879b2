// ga_unit: genetic-phase datapath, one offspring row per clock.
//
// Each of LANES lanes holds, like the per-cell genetic firmware, two parent
// registers, a crossover mask, a mutation mask and an offspring register,
// working on one cell's configuration word:
//   offspring.chrom = ((pa.chrom & xmask) | (pb.chrom & ~xmask)) ^ mmask
//   offspring.ctype/dir = xsel ? pa : pb   (neuron seed taken whole)
// The masks come from a 64-bit xorshift generator per lane (state update
// s ^= s<<13; s ^= s>>7; s ^= s<<17), advanced once per in_valid: bits [5:0]
// form xmask, bit 6 xsel, and mutation bit i is set when byte
// s[8*i+15 -: 8] is below mut_rate (probability mut_rate/256 per bit).
// Timing: parents presented with in_valid at clock t give the offspring on
// out_valid/offspring at clock t+1. seed_load reseeds every lane with
// seed ^ (lane index + 1) * 0x9E3779B97F4A7C15.
// From the original CBM description: crossover and mutation masks, two parent registers and
// an offspring register per cell, offspring made in hardware, selection left
// to the host. The mask generator and the rule for the neuron fields are this
// design's choice.
module ga_unit
  import cbm_pkg::*;
#(
  parameter int unsigned LANES = 144
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [63:0] seed,
  input  logic [7:0]  mut_rate,
  input  logic        in_valid,
  input  cell_cfg_t   pa [LANES],
  input  cell_cfg_t   pb [LANES],
  output logic        out_valid,
  output cell_cfg_t   offspring [LANES]
);

  localparam logic [63:0] GOLD = 64'h9E37_79B9_7F4A_7C15;

  function automatic logic [63:0] xs64(input logic [63:0] s);
    logic [63:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 7);
    t = t ^ (t << 17);
    return t;
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [63:0] rs;
    logic [5:0]  xmask, mmask;
    logic        xsel;
    cell_cfg_t   off;

    assign xmask = rs[5:0];
    assign xsel  = rs[6];
    always_comb begin
      for (int i = 0; i < 6; i++) mmask[i] = (rs[8*i+15 -: 8] < mut_rate);
      off.chrom = ((pa[l].chrom & xmask) | (pb[l].chrom & ~xmask)) ^ mmask;
      off.ctype = xsel ? pa[l].ctype : pb[l].ctype;
      off.dir   = xsel ? pa[l].dir   : pb[l].dir;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rs           <= xs64(GOLD * 64'(l + 1));
        offspring[l] <= '0;
      end else if (seed_load) begin
        rs <= seed ^ (GOLD * 64'(l + 1));
      end else if (in_valid) begin
        offspring[l] <= off;
        rs           <= xs64(rs);
      end
    end

  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid & ~seed_load;
  end

endmodule
