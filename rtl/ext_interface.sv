// ext_interface: collects the output spiketrains of the running module and
// hands them to external devices and to the Signal Memory.
//
// While a module runs, each cap_valid clock shifts the NOUT output-point
// bits into NOUT trains of TRAIN bits (train bit t = output at the t-th run
// clock of the slot). emit (one clock, at the end of the module's slot)
// copies the trains and the module number mod_id to the external port
// (ext_valid pulses one clock later with ext_mod and ext_trains) and starts
// writing the first NSIG trains to the Signal Memory, one per clock, over
// the next NSIG clocks. Capture restarts from bit 0 after emit.
// From the original CBM description: a module sends up to 4 spiketrains to an external
// device, and its output trains are saved back to the Signal Memory, which
// holds up to three per module (so output point 3 goes only to the external
// port). The capture registers and the write sequencing are this design's
// choice.
module ext_interface #(
  parameter int unsigned NMOD  = 32768,
  parameter int unsigned NOUT  = 4,
  parameter int unsigned NSIG  = 3,
  parameter int unsigned TRAIN = 96,
  localparam int unsigned MW   = (NMOD > 1) ? $clog2(NMOD) : 1,
  localparam int unsigned SW   = (NSIG > 1) ? $clog2(NSIG) : 1,
  localparam int unsigned TW   = $clog2(TRAIN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cap_valid,
  input  logic [NOUT-1:0]  cap_bits,
  input  logic             emit,
  input  logic [MW-1:0]    mod_id,
  // external device port
  output logic             ext_valid,
  output logic [MW-1:0]    ext_mod,
  output logic [TRAIN-1:0] ext_trains [NOUT],
  // signal memory write port
  output logic             sm_wr_en,
  output logic [MW-1:0]    sm_wr_mod,
  output logic [SW-1:0]    sm_wr_sig,
  output logic [TRAIN-1:0] sm_wr_data
);

  logic [TRAIN-1:0] cap [NOUT];
  logic [TW-1:0]    pos;
  logic             wr_act;
  logic [SW-1:0]    wr_sig;

  assign sm_wr_en   = wr_act;
  assign sm_wr_mod  = ext_mod;
  assign sm_wr_sig  = wr_sig;
  assign sm_wr_data = ext_trains[wr_sig];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < int'(NOUT); o++) begin
        cap[o]        <= '0;
        ext_trains[o] <= '0;
      end
      pos       <= '0;
      ext_valid <= 1'b0;
      ext_mod   <= '0;
      wr_act    <= 1'b0;
      wr_sig    <= '0;
    end else begin
      ext_valid <= 1'b0;
      if (wr_act) begin
        if (wr_sig == SW'(NSIG - 1)) wr_act <= 1'b0;
        else                         wr_sig <= wr_sig + 1'b1;
      end
      if (emit) begin
        for (int o = 0; o < int'(NOUT); o++) begin
          ext_trains[o] <= cap[o];
          cap[o]        <= '0;
        end
        ext_mod   <= mod_id;
        ext_valid <= 1'b1;
        wr_act    <= 1'b1;
        wr_sig    <= '0;
        pos       <= '0;
      end else if (cap_valid && pos < TW'(TRAIN)) begin
        for (int o = 0; o < int'(NOUT); o++) cap[o][pos] <= cap_bits[o];
        pos <= pos + 1'b1;
      end
    end
  end

  a_emit_gap: assert property (@(posedge clk) disable iff (!rst_n) emit |-> !wr_act);

endmodule
