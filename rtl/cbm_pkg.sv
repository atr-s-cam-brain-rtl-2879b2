// cbm_pkg: types and constants shared by the CAM-Brain Machine RTL.
//
// A CA cell is configured by an 11-bit word: its type (blank, neuron, axon,
// dendrite), a 3-bit face index "dir" and a 6-bit chromosome. The meaning of
// dir depends on the type: the axonic output face of a neuron, the input face
// of an axon, the output face of a dendrite. The chromosome is the growth mask
// of a blank/axon/dendrite cell (one bit per face) and the excitatory (1) /
// inhibitory (0) synapse mask of a neuron. The four cell types, the 6-bit
// chromosome and the six faces follow the CoDi model; the bit encoding is this
// design's choice.
package cbm_pkg;

  typedef enum logic [1:0] {
    CT_BLANK    = 2'd0,
    CT_NEURON   = 2'd1,
    CT_AXON     = 2'd2,
    CT_DENDRITE = 2'd3
  } cell_type_e;

  typedef struct packed {
    cell_type_e  ctype;
    logic [2:0]  dir;
    logic [5:0]  chrom;
  } cell_cfg_t;

  localparam int unsigned CFG_W = $bits(cell_cfg_t);

  // Faces: 0 = +x (east), 1 = -x (west), 2 = +y (north), 3 = -y (south),
  // 4 = +z (top), 5 = -z (bottom). The opposite face is face ^ 1.
  localparam int unsigned NFACE = 6;

  typedef enum logic [1:0] {
    PH_IDLE   = 2'd0,
    PH_GROW   = 2'd1,
    PH_SIGNAL = 2'd2
  } ca_phase_e;

  // One-hot mask of a face index; index 6 and 7 give no face.
  function automatic logic [5:0] face_onehot(input logic [2:0] f);
    logic [5:0] m;
    m = '0;
    if (f < 3'd6) m[f] = 1'b1;
    return m;
  endfunction

  function automatic logic [2:0] popcount6(input logic [5:0] v);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < 6; i++) n = n + {2'b0, v[i]};
    return n;
  endfunction

  // Cross-reference list entry: where one input of a module comes from.
  typedef struct packed {
    logic        valid;   // input is connected
    logic        ext;     // source is the external interface, not the Signal Memory
    logic [14:0] src_mod; // source module (or external channel when ext = 1)
    logic [1:0]  src_sig; // which of the source's stored output trains
  } xref_entry_t;

  localparam int unsigned XREF_W = $bits(xref_entry_t);

endpackage
