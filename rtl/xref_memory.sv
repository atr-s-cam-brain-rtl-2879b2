// xref_memory: the module cross-reference memory of the brain.
//
// For each of NMOD modules it lists where each of its NIN inputs comes from
// (an xref_entry_t: valid, external flag, source module, source output).
// Entries are stored two per word, so the input buffer loader fetches the
// 180 sources of a module in 90 clocks, inside one 96-clock module slot.
// The host writes one word (two entries) per wr_en; a read (rd_en) returns
// the word one clock later on rd_data.
// From the original CBM description: a per-module list of up to 180 source modules, written
// by the host, 32,768 modules. This design's choices: the entry format and
// the two-entries-per-word organisation. (A full list for 32,768 modules
// needs about 12.5 Mbytes in this format, more than the 3 Mbytes the
// original machine quotes.)
module xref_memory
  import cbm_pkg::*;
#(
  parameter int unsigned NMOD  = 32768,
  parameter int unsigned NIN   = 180,
  localparam int unsigned NP   = NIN / 2,
  localparam int unsigned MW   = (NMOD > 1) ? $clog2(NMOD) : 1,
  localparam int unsigned PW   = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [MW-1:0] wr_mod,
  input  logic [PW-1:0] wr_pair,
  input  xref_entry_t   wr_data [2],
  input  logic          rd_en,
  input  logic [MW-1:0] rd_mod,
  input  logic [PW-1:0] rd_pair,
  output xref_entry_t   rd_data [2]
);

  logic [2*XREF_W-1:0] mem [NMOD * NP];

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_mod) * NP + int'(wr_pair)] <= {wr_data[1], wr_data[0]};
    if (rd_en) {rd_data[1], rd_data[0]} <= mem[int'(rd_mod) * NP + int'(rd_pair)];
  end

endmodule
