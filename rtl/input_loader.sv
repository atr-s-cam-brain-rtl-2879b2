// input_loader: fills the signal input buffer for the next module.
//
// On start it walks the NIN/2 cross-reference words of module mod_id, one per
// clock. For the two entries of each word it fetches the source trains in
// parallel: from the Signal Memory (ext = 0) or from the external interface
// port (ext = 1, src_mod names the external channel); an entry that is not
// valid gives an all-zero train. The trains are written into the back bank
// of the signal input buffer at input positions 2p and 2p+1.
// Timing: a three-stage pipeline (cross-reference read, train read, buffer
// write). Word p is requested p+1 clocks after start, its trains are written
// two clocks later, and done pulses NIN/2+3 clocks after start (93 for
// NIN = 180), inside one 96-clock module slot.
// From the original CBM description: the input buffer is loaded, from the netlist in the
// module interconnection memory, with the trains saved from the previous
// instantiation of each source module, or with trains from the external
// interface. The pipeline is this design's choice.
module input_loader
  import cbm_pkg::*;
#(
  parameter int unsigned NMOD  = 32768,
  parameter int unsigned NIN   = 180,
  parameter int unsigned NSIG  = 3,
  parameter int unsigned TRAIN = 96,
  localparam int unsigned NP   = NIN / 2,
  localparam int unsigned MW   = (NMOD > 1) ? $clog2(NMOD) : 1,
  localparam int unsigned PW   = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned SW   = (NSIG > 1) ? $clog2(NSIG) : 1,
  localparam int unsigned IW   = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [MW-1:0]    mod_id,
  output logic             busy,
  output logic             done,
  // cross-reference memory read port
  output logic             xr_rd_en,
  output logic [MW-1:0]    xr_rd_mod,
  output logic [PW-1:0]    xr_rd_pair,
  input  xref_entry_t      xr_rd_data [2],
  // signal memory read ports
  output logic [1:0]       sm_rd_en,
  output logic [MW-1:0]    sm_rd_mod  [2],
  output logic [SW-1:0]    sm_rd_sig  [2],
  input  logic [TRAIN-1:0] sm_rd_data [2],
  // external spiketrain port (combinational read)
  output logic [14:0]      ext_idx    [2],
  input  logic [TRAIN-1:0] ext_train  [2],
  // signal input buffer write ports
  output logic [1:0]       ib_wr_en,
  output logic [IW-1:0]    ib_wr_idx  [2],
  output logic [TRAIN-1:0] ib_wr_data [2]
);

  logic [PW-1:0]    p0;          // stage 0: word being requested
  logic             v0, v1, v2;  // stage valids
  logic [PW-1:0]    p1, p2;
  logic [MW-1:0]    mod_q;
  xref_entry_t      e2 [2];
  logic [TRAIN-1:0] x2 [2];

  assign busy       = v0 | v1 | v2;
  assign xr_rd_en   = v0;
  assign xr_rd_mod  = mod_q;
  assign xr_rd_pair = p0;

  // stage 1: entries arrive, request trains
  for (genvar k = 0; k < 2; k++) begin : g_k
    assign sm_rd_en[k]  = v1 & xr_rd_data[k].valid & ~xr_rd_data[k].ext;
    assign sm_rd_mod[k] = MW'(xr_rd_data[k].src_mod);
    assign sm_rd_sig[k] = SW'(xr_rd_data[k].src_sig);
    assign ext_idx[k]   = xr_rd_data[k].src_mod;

    // stage 2: write the train
    assign ib_wr_en[k]   = v2;
    assign ib_wr_idx[k]  = IW'(2 * int'(p2) + k);
    assign ib_wr_data[k] = !e2[k].valid ? '0 : (e2[k].ext ? x2[k] : sm_rd_data[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0; v2 <= 1'b0;
      p0 <= '0;   p1 <= '0;   p2 <= '0;
      mod_q <= '0;
      done  <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        e2[k] <= '0;
        x2[k] <= '0;
      end
    end else begin
      done <= v2 && !v1 && !v0;
      if (start && !busy) begin
        v0    <= 1'b1;
        p0    <= '0;
        mod_q <= mod_id;
      end else if (v0) begin
        if (p0 == PW'(NP - 1)) v0 <= 1'b0;
        else                   p0 <= p0 + 1'b1;
      end
      v1 <= v0;
      p1 <= p0;
      v2 <= v1;
      p2 <= p1;
      for (int k = 0; k < 2; k++) begin
        e2[k] <= xr_rd_data[k];
        x2[k] <= ext_train[k];
      end
    end
  end

endmodule
