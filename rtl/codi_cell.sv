// codi_cell: one cell of the CoDi-1Bit cellular automaton.
//
// A cell talks to its six face neighbours over 1-bit links (in_bits[f] from
// the neighbour on face f, out_bits[f] to it). What it does depends on its
// configured type:
//   growth phase (phase = PH_GROW). Sub-steps alternate between "grow
//     dendrite" (axon_tick = 0) and "grow axon" (axon_tick = 1).
//     neuron:   sends growth signals on its five dendritic faces on dendrite
//               sub-steps and on its axon face on axon sub-steps.
//     blank:    a growth signal on any face (lowest face wins) turns it into
//               a dendrite (dendrite sub-step) or axon (axon sub-step) whose
//               dir is that face, and arms it to pass the signal on.
//     axon/dendrite: a growth signal on face dir during its own sub-step
//               kind is re-sent, on the next sub-step of the same kind, on
//               every face whose chromosome bit is 1 (dir excluded).
//   signalling phase (phase = PH_SIGNAL), all outputs registered:
//     dendrite: XOR of the five non-dir inputs, sent on face dir.
//     axon:     input on face dir, sent on the other five faces.
//     neuron:   4-bit accumulator adds excitatory and subtracts inhibitory
//               inputs (chromosome bit 1 = excitatory), saturating at 0 and
//               15; when the sum exceeds THRESH the neuron fires for one
//               clock on face dir and the accumulator clears.
//     blank:    silent.
// Configuration is double-buffered: cfg_we writes the shadow register while
// the active one runs; swap exchanges the two in one clock (so a grown
// phenotype can be read back from the shadow) and clears the signal state.
// sig_clear clears the signal state only (multi-test reset).
//
// From the CoDi model: the cell types, five inputs/one output, 4-bit
// accumulator with excitatory/inhibitory inputs, XOR dendrites, alternating
// growth signals steered by a 6-bit mask, the dual register. This design's
// choices: the mask is absolute (one bit per face), the threshold value,
// saturation, the lowest-face priority and the two-sub-step forwarding.
module codi_cell
  import cbm_pkg::*;
#(
  parameter int unsigned THRESH = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ca_phase_e  phase,
  input  logic       axon_tick,
  input  logic       sig_clear,
  input  logic       swap,
  input  logic       cfg_we,
  input  cell_cfg_t  cfg_wdata,
  output cell_cfg_t  cfg_shadow,
  output cell_cfg_t  cfg_active,
  input  logic [5:0] in_bits,
  output logic [5:0] out_bits,
  output logic       state
);

  cell_cfg_t  cfg, shd;
  logic       sig;       // registered signal (signalling phase)
  logic       pend;      // armed growth signal (growth phase)
  logic [3:0] acc;

  logic [5:0] dmask, others;
  assign dmask  = face_onehot(cfg.dir);
  assign others = ~dmask;

  // lowest face carrying a growth signal
  logic [2:0] first_in;
  always_comb begin
    first_in = 3'd0;
    for (int f = 5; f >= 0; f--)
      if (in_bits[f]) first_in = 3'(f);
  end

  // neuron accumulator update
  logic [3:0] acc_next;
  logic       fire;
  always_comb begin
    logic [5:0] act;
    int         s;
    act = in_bits & others;
    s = int'(acc) + int'(popcount6(act & cfg.chrom)) - int'(popcount6(act & ~cfg.chrom));
    if (s < 0)  s = 0;
    if (s > 15) s = 15;
    acc_next = 4'(s);
    fire     = (s > int'(THRESH));
  end

  // outputs
  always_comb begin
    out_bits = '0;
    unique case (phase)
      PH_GROW: begin
        unique case (cfg.ctype)
          CT_NEURON:   out_bits = axon_tick ? dmask : others;
          CT_DENDRITE: out_bits = (!axon_tick && pend) ? (cfg.chrom & others) : '0;
          CT_AXON:     out_bits = ( axon_tick && pend) ? (cfg.chrom & others) : '0;
          default:     out_bits = '0;
        endcase
      end
      PH_SIGNAL: begin
        unique case (cfg.ctype)
          CT_NEURON, CT_DENDRITE: out_bits = sig ? dmask : '0;
          CT_AXON:                out_bits = sig ? others : '0;
          default:                out_bits = '0;
        endcase
      end
      default: out_bits = '0;
    endcase
  end

  assign state      = sig;
  assign cfg_shadow = shd;
  assign cfg_active = cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg  <= '0;
      shd  <= '0;
      sig  <= 1'b0;
      pend <= 1'b0;
      acc  <= '0;
    end else if (swap) begin
      cfg  <= shd;
      shd  <= cfg;
      sig  <= 1'b0;
      pend <= 1'b0;
      acc  <= '0;
    end else begin
      if (cfg_we) shd <= cfg_wdata;
      if (sig_clear) begin
        sig  <= 1'b0;
        pend <= 1'b0;
        acc  <= '0;
      end else if (phase == PH_GROW) begin
        unique case (cfg.ctype)
          CT_BLANK: if (|in_bits) begin
            cfg.ctype <= axon_tick ? CT_AXON : CT_DENDRITE;
            cfg.dir   <= first_in;
            pend      <= 1'b1;
          end
          CT_DENDRITE: if (!axon_tick) pend <= |(in_bits & dmask);
          CT_AXON:     if ( axon_tick) pend <= |(in_bits & dmask);
          default: ;
        endcase
      end else if (phase == PH_SIGNAL) begin
        unique case (cfg.ctype)
          CT_DENDRITE: sig <= ^(in_bits & others);
          CT_AXON:     sig <= |(in_bits & dmask);
          CT_NEURON: begin
            sig <= fire;
            acc <= fire ? 4'd0 : acc_next;
          end
          default:     sig <= 1'b0;
        endcase
      end
    end
  end

  // configuration may not be written in the clock that swaps the registers
  a_no_we_on_swap: assert property (@(posedge clk) disable iff (!rst_n) !(swap && cfg_we));

endmodule
