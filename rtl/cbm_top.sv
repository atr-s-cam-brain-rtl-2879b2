// cbm_top: the CAM-Brain Machine, a hardware engine that grows, evaluates
// and breeds CoDi cellular-automaton neural modules, and runs a brain of up
// to 32,768 of them by time-sharing one 24x24x24-cell CA core.
//
// Blocks: ca_module (the CA core, double-buffered configuration),
// config_loader (genotype/phenotype memory controller), ga_unit (crossover
// and mutation), spiketrain_buffer x2 (evaluation input and target
// vectors), fitness_evaluator (SIIC convolution and deviation sum),
// xref_memory and signal_memory (module interconnection), input_loader and
// signal_input_buffer (run-mode inputs of the next module), ext_interface
// (output trains to devices and Signal Memory), hsa_spiker (analog to
// spiketrain conversion for external signals), cbm_controller (sequencer).
//
// Interfaces brought out:
//  - host command port (see cbm_controller) and host write ports for the
//    filter taps, the two evaluation buffers, the cross-reference memory and
//    the GA seed and mutation rate; fitness/fitness_valid report a result.
//  - genotype/phenotype memory port: one configuration row (LANES cells) per
//    word, read data due one clock after a read request. The memory itself
//    (DRAM on the FPGA boards) is outside this RTL.
//  - external interface: two combinational read ports for input trains from
//    devices, the output-train record, and the Hough spiker stream.
// The block list and all sizes follow the original CBM description; see each block for what
// is its own choice.
module cbm_top
  import cbm_pkg::*;
#(
  parameter int unsigned X      = 24,
  parameter int unsigned Y      = 24,
  parameter int unsigned Z      = 24,
  parameter int unsigned LANES  = 144,
  parameter int unsigned NIN    = 180,
  parameter int unsigned NOUT   = 4,
  parameter int unsigned NSIG   = 3,
  parameter int unsigned TRAIN  = 96,
  parameter int unsigned NMOD   = 32768,
  parameter int unsigned TAPS   = 20,
  parameter int unsigned CW     = 8,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned AW     = 32,
  parameter int unsigned THRESH = 2,
  parameter int unsigned HSW    = 16,
  localparam int unsigned ROWS  = X * Y * Z / LANES,
  localparam int unsigned RW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned MW    = (NMOD > 1) ? $clog2(NMOD) : 1,
  localparam int unsigned BW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned KW    = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned PW    = (NIN / 2 > 1) ? $clog2(NIN / 2) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host command
  input  logic                  cmd_valid,
  input  logic [1:0]            cmd,
  input  logic [AW-1:0]         geno_addr,
  input  logic [AW-1:0]         pheno_addr,
  input  logic [AW-1:0]         parent_a,
  input  logic [AW-1:0]         parent_b,
  input  logic [15:0]           grow_cycles,
  input  logic [BW:0]           sig_len,
  input  logic [MW:0]           n_mods,
  input  logic [15:0]           n_passes,
  output logic                  busy,
  output logic                  done,
  output logic [31:0]           fitness,
  output logic                  fitness_valid,
  // host writes
  input  logic                  coef_we,
  input  logic [KW-1:0]         coef_idx,
  input  logic signed [CW-1:0]  coef_data,
  input  logic                  ib_we,
  input  logic [BW-1:0]         ib_addr,
  input  logic [NIN-1:0]        ib_data,
  input  logic                  tg_we,
  input  logic [BW-1:0]         tg_addr,
  input  logic [NSIG:0]         tg_data,       // {clear flag, target bits}
  input  logic                  xr_we,
  input  logic [MW-1:0]         xr_mod,
  input  logic [PW-1:0]         xr_pair,
  input  xref_entry_t           xr_data [2],
  input  logic                  ga_seed_load,
  input  logic [63:0]           ga_seed,
  input  logic [7:0]            ga_mut_rate,
  // genotype/phenotype memory
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [AW-1:0]         mem_addr,
  output cell_cfg_t             mem_wdata [LANES],
  input  cell_cfg_t             mem_rdata [LANES],
  // external interface
  output logic [14:0]           ext_in_idx   [2],
  input  logic [TRAIN-1:0]      ext_in_train [2],
  output logic                  ext_valid,
  output logic [MW-1:0]         ext_mod,
  output logic [TRAIN-1:0]      ext_trains [NOUT],
  input  logic                  hsa_clear,
  input  logic                  hsa_in_valid,
  input  logic signed [HSW-1:0] hsa_sample,
  output logic                  hsa_spike_valid,
  output logic                  hsa_spike
);

  // ---------------- filter taps ----------------
  logic signed [CW-1:0] coef [TAPS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int k = 0; k < int'(TAPS); k++) coef[k] <= '0;
    else if (coef_we) coef[coef_idx] <= coef_data;
  end

  // ---------------- controller ----------------
  logic          ld_start, ld_done, ld_busy;
  logic [1:0]    ld_op;
  logic [AW-1:0] ld_a, ld_b, ld_o;
  ca_phase_e     phase;
  logic          axon_tick, sig_clear, swap, in_sel;
  logic          eb_rd_en;
  logic [BW-1:0] eb_rd_addr;
  logic [NSIG:0] tg_vec;
  logic          fe_start, fe_in_valid, fe_last, fe_test_clear, fe_done;
  logic          il_start, il_done, il_busy;
  logic [MW-1:0] il_mod, emit_mod;
  logic [$clog2(TRAIN)-1:0] sib_rd_t;
  logic          cap_valid, emit;

  cbm_controller #(.NMOD(NMOD), .ROWS(ROWS), .TRAIN(TRAIN), .DEPTH(DEPTH), .AW(AW)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .geno_addr, .pheno_addr, .parent_a, .parent_b,
    .grow_cycles, .sig_len, .n_mods, .n_passes, .busy, .done,
    .ld_start, .ld_op, .ld_a, .ld_b, .ld_o, .ld_done,
    .phase, .axon_tick, .sig_clear, .swap, .in_sel,
    .eb_rd_en, .eb_rd_addr, .tgt_clear(tg_vec[NSIG]),
    .fe_start, .fe_in_valid, .fe_last, .fe_test_clear, .fe_done,
    .il_start, .il_mod, .il_done, .sib_rd_t, .cap_valid, .emit, .emit_mod);

  // ---------------- CA core ----------------
  logic          cfg_we;
  logic [RW-1:0] cfg_row, rd_row;
  cell_cfg_t     cfg_wdata [LANES];
  cell_cfg_t     rd_data   [LANES];
  logic [NIN-1:0]  ib_vec, sib_vec, ca_in;
  logic [NOUT-1:0] out_pts;

  assign ca_in = in_sel ? sib_vec : ib_vec;

  ca_module #(.X(X), .Y(Y), .Z(Z), .LANES(LANES), .NIN(NIN), .NOUT(NOUT), .THRESH(THRESH)) u_ca (
    .clk, .rst_n, .phase, .axon_tick, .sig_clear, .swap,
    .cfg_we, .cfg_row, .cfg_wdata, .rd_row, .rd_data,
    .ext_in(ca_in), .out_pts);

  // ---------------- genotype/phenotype memory controller and GA ----------------
  logic      ga_valid, ga_out_valid;
  cell_cfg_t ga_pa [LANES];
  cell_cfg_t ga_pb [LANES];
  cell_cfg_t ga_off [LANES];

  config_loader #(.LANES(LANES), .ROWS(ROWS), .AW(AW)) u_ld (
    .clk, .rst_n, .start(ld_start), .op(ld_op), .addr_a(ld_a), .addr_b(ld_b), .addr_o(ld_o),
    .busy(ld_busy), .done(ld_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .cfg_we, .cfg_row, .cfg_wdata, .rd_row, .rd_data,
    .ga_valid, .ga_pa, .ga_pb, .ga_out_valid, .ga_off);

  ga_unit #(.LANES(LANES)) u_ga (
    .clk, .rst_n, .seed_load(ga_seed_load), .seed(ga_seed), .mut_rate(ga_mut_rate),
    .in_valid(ga_valid), .pa(ga_pa), .pb(ga_pb), .out_valid(ga_out_valid), .offspring(ga_off));

  // ---------------- fitness evaluation ----------------
  spiketrain_buffer #(.W(NIN), .DEPTH(DEPTH)) u_ibuf (
    .clk, .wr_en(ib_we), .wr_addr(ib_addr), .wr_data(ib_data),
    .rd_en(eb_rd_en), .rd_addr(eb_rd_addr), .rd_data(ib_vec));

  spiketrain_buffer #(.W(NSIG + 1), .DEPTH(DEPTH)) u_tbuf (
    .clk, .wr_en(tg_we), .wr_addr(tg_addr), .wr_data(tg_data),
    .rd_en(eb_rd_en), .rd_addr(eb_rd_addr), .rd_data(tg_vec));

  fitness_evaluator #(.NCH(NSIG), .TAPS(TAPS), .CW(CW), .FW(32)) u_fe (
    .clk, .rst_n, .coef, .start(fe_start), .test_clear(fe_test_clear),
    .in_valid(fe_in_valid), .last(fe_last),
    .out_spk(out_pts[NSIG-1:0]), .tgt_spk(tg_vec[NSIG-1:0]),
    .fitness, .done(fe_done));

  assign fitness_valid = fe_done;

  // ---------------- module interconnection (run mode) ----------------
  logic                     xr_rd_en;
  logic [MW-1:0]            xr_rd_mod;
  logic [PW-1:0]            xr_rd_pair;
  xref_entry_t              xr_rd_data [2];
  logic [1:0]               sm_rd_en;
  logic [MW-1:0]            sm_rd_mod [2];
  logic [$clog2(NSIG)-1:0]  sm_rd_sig [2];
  logic [TRAIN-1:0]         sm_rd_data [2];
  logic                     sm_wr_en;
  logic [MW-1:0]            sm_wr_mod;
  logic [$clog2(NSIG)-1:0]  sm_wr_sig;
  logic [TRAIN-1:0]         sm_wr_data;
  logic [1:0]               ib2_wr_en;
  logic [$clog2(NIN)-1:0]   ib2_wr_idx [2];
  logic [TRAIN-1:0]         ib2_wr_data [2];

  xref_memory #(.NMOD(NMOD), .NIN(NIN)) u_xref (
    .clk, .wr_en(xr_we), .wr_mod(xr_mod), .wr_pair(xr_pair), .wr_data(xr_data),
    .rd_en(xr_rd_en), .rd_mod(xr_rd_mod), .rd_pair(xr_rd_pair), .rd_data(xr_rd_data));

  signal_memory #(.NMOD(NMOD), .NSIG(NSIG), .TRAIN(TRAIN)) u_sm (
    .clk, .wr_en(sm_wr_en), .wr_mod(sm_wr_mod), .wr_sig(sm_wr_sig), .wr_data(sm_wr_data),
    .rd_en(sm_rd_en), .rd_mod(sm_rd_mod), .rd_sig(sm_rd_sig), .rd_data(sm_rd_data));

  input_loader #(.NMOD(NMOD), .NIN(NIN), .NSIG(NSIG), .TRAIN(TRAIN)) u_il (
    .clk, .rst_n, .start(il_start), .mod_id(il_mod), .busy(il_busy), .done(il_done),
    .xr_rd_en, .xr_rd_mod, .xr_rd_pair, .xr_rd_data,
    .sm_rd_en, .sm_rd_mod, .sm_rd_sig, .sm_rd_data,
    .ext_idx(ext_in_idx), .ext_train(ext_in_train),
    .ib_wr_en(ib2_wr_en), .ib_wr_idx(ib2_wr_idx), .ib_wr_data(ib2_wr_data));

  signal_input_buffer #(.NIN(NIN), .TRAIN(TRAIN)) u_sib (
    .clk, .rst_n, .swap(swap & in_sel), .wr_en(ib2_wr_en), .wr_idx(ib2_wr_idx),
    .wr_data(ib2_wr_data), .rd_t(sib_rd_t), .vec(sib_vec));

  ext_interface #(.NMOD(NMOD), .NOUT(NOUT), .NSIG(NSIG), .TRAIN(TRAIN)) u_ext (
    .clk, .rst_n, .cap_valid, .cap_bits(out_pts), .emit, .mod_id(emit_mod),
    .ext_valid, .ext_mod, .ext_trains,
    .sm_wr_en, .sm_wr_mod, .sm_wr_sig, .sm_wr_data);

  // ---------------- Hough spiker for external analog signals ----------------
  hsa_spiker #(.TAPS(TAPS), .CW(CW), .SW(HSW)) u_hsa (
    .clk, .rst_n, .clear(hsa_clear), .coef, .in_valid(hsa_in_valid), .sample(hsa_sample),
    .spike_valid(hsa_spike_valid), .spike(hsa_spike));

  logic unused_busy;
  assign unused_busy = ld_busy ^ il_busy;

endmodule
