// tb_cbm_top: end-to-end test of the CAM-Brain Machine on a 4x4x3-cell
// core (16-cell rows, 12 inputs, 16-bit trains, 8 modules, 5 taps).
//  1. EVOLVE: a random genotype with three neurons is loaded, grown and
//     signalled with random inputs and a two-test target (one multi-test
//     clear). The fitness is recomputed here from the module outputs seen
//     during signalling; the saved phenotype must keep the neurons and every
//     grown cell must point at a non-blank neighbour.
//  2. BREED: offspring of two genotypes at mutation rate 0; every chromosome
//     bit and neuron field must come from one of the parents.
//  3. RUN: a two-module brain for three passes. Module 0 takes external
//     trains, module 1 takes module 0's stored outputs. Checks every train
//     loaded into the input buffer, every input bit the core sees, the
//     Signal Memory contents, the order of output records and the slot
//     length.
//  4. The Hough spiker on the worked example (1101001).
// Each mechanism (growth, signalling, multi-test clear, configuration swap,
// breeding, module slot, external input, routed input, output record, HSA
// spike, output activity) is counted; one that never happens is a failure.
module tb_cbm_top;
  import cbm_pkg::*;
  localparam int X = 4, Y = 4, Z = 3, LANES = 16, NIN = 12, NOUT = 4, NSIG = 3, TRAIN = 16;
  localparam int NMOD = 8, TAPS = 5, CW = 8, DEPTH = 64, AW = 32, HSW = 16;
  localparam int ROWS = X * Y * Z / LANES, N = X * Y * Z;
  localparam int MW = $clog2(NMOD), BW = $clog2(DEPTH), KW = $clog2(TAPS), PW = $clog2(NIN / 2);

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0; logic [1:0] cmd = '0;
  logic [AW-1:0] geno_addr = '0, pheno_addr = '0, parent_a = '0, parent_b = '0;
  logic [15:0] grow_cycles = '0, n_passes = '0;
  logic [BW:0] sig_len = '0;
  logic [MW:0] n_mods = '0;
  logic busy, done, fitness_valid;
  logic [31:0] fitness;
  logic coef_we = 0; logic [KW-1:0] coef_idx = '0; logic signed [CW-1:0] coef_data = '0;
  logic ib_we = 0; logic [BW-1:0] ib_addr = '0; logic [NIN-1:0] ib_data = '0;
  logic tg_we = 0; logic [BW-1:0] tg_addr = '0; logic [NSIG:0] tg_data = '0;
  logic xr_we = 0; logic [MW-1:0] xr_mod = '0; logic [PW-1:0] xr_pair = '0;
  xref_entry_t xr_data [2];
  logic ga_seed_load = 0; logic [63:0] ga_seed = 64'd99; logic [7:0] ga_mut_rate = '0;
  logic mem_req, mem_we; logic [AW-1:0] mem_addr;
  cell_cfg_t mem_wdata [LANES];
  cell_cfg_t mem_rdata [LANES];
  logic [14:0] ext_in_idx [2];
  logic [TRAIN-1:0] ext_in_train [2];
  logic ext_valid; logic [MW-1:0] ext_mod;
  logic [TRAIN-1:0] ext_trains [NOUT];
  logic hsa_clear = 0, hsa_in_valid = 0; logic signed [HSW-1:0] hsa_sample = '0;
  logic hsa_spike_valid, hsa_spike;
  int checks = 0, failures = 0;

  cbm_top #(.X(X), .Y(Y), .Z(Z), .LANES(LANES), .NIN(NIN), .NOUT(NOUT), .NSIG(NSIG), .TRAIN(TRAIN),
            .NMOD(NMOD), .TAPS(TAPS), .CW(CW), .DEPTH(DEPTH), .AW(AW), .HSW(HSW)) dut (.*);
  row_memory_model #(.LANES(LANES), .WORDS(128), .AW(AW)) mem (.*);
  always #5 clk = ~clk;

  function automatic logic [TRAIN-1:0] ext_fn(int idx);
    return TRAIN'(idx * 52711 + 12345);
  endfunction
  always_comb for (int k = 0; k < 2; k++) ext_in_train[k] = ext_fn(int'(ext_in_idx[k]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_grow, m_sig, m_clear, m_swap, m_breed, m_slot, m_ext_in, m_routed, m_record, m_hsa, m_active;
  always @(posedge clk) if (rst_n) begin
    if (dut.phase == PH_GROW) m_grow++;
    if (dut.fe_in_valid) m_sig++;
    if (dut.fe_in_valid && dut.fe_test_clear) m_clear++;
    if (dut.swap) m_swap++;
    if (dut.ga_out_valid) m_breed++;
    if (dut.swap && dut.in_sel) m_slot++;
    if (ext_valid) m_record++;
    if (hsa_spike_valid && hsa_spike) m_hsa++;
    if (dut.phase == PH_SIGNAL && dut.out_pts != '0) m_active++;
  end

  // ---------------- fitness reference ----------------
  int coefs [TAPS] = '{1, 4, 9, 5, -2};
  bit ho [NSIG][$];
  bit ht [NSIG][$];
  longint ref_fit;
  always @(posedge clk) if (rst_n && dut.fe_start) begin
    ref_fit = 0;
    for (int c = 0; c < NSIG; c++) begin ho[c] = {}; ht[c] = {}; end
  end else if (rst_n && dut.fe_in_valid) begin
    for (int c = 0; c < NSIG; c++) begin
      int yo, yt;
      if (dut.fe_test_clear) begin ho[c] = {}; ht[c] = {}; end
      ho[c].push_front(dut.out_pts[c]); ht[c].push_front(dut.tg_vec[c]);
      yo = 0; yt = 0;
      for (int k = 0; k < TAPS && k < ho[c].size(); k++) begin
        if (ho[c][k]) yo += coefs[k];
        if (ht[c][k]) yt += coefs[k];
      end
      ref_fit += (yo > yt) ? yo - yt : yt - yo;
    end
  end

  // ---------------- run-mode reference ----------------
  xref_entry_t xr_m [NMOD][NIN];
  logic [TRAIN-1:0] sm_m [NMOD][NSIG];     // what the Signal Memory should hold
  logic [TRAIN-1:0] back_m [NIN], front_m [NIN];
  int loading_mod, run_t;
  int rec_seq [$];
  int swap_at [$];
  int cyc_now = 0;
  always @(posedge clk) if (rst_n) begin
    cyc_now++;
    if (dut.il_start) loading_mod = int'(dut.il_mod);
    for (int k = 0; k < 2; k++) if (dut.ib2_wr_en[k]) begin
      int i; xref_entry_t e; logic [TRAIN-1:0] exp_t;
      i = int'(dut.ib2_wr_idx[k]);
      e = xr_m[loading_mod][i];
      exp_t = !e.valid ? '0 : e.ext ? ext_fn(int'(e.src_mod)) : sm_m[e.src_mod][e.src_sig];
      check(dut.ib2_wr_data[k] == exp_t, $sformatf("module %0d input train %0d", loading_mod, i));
      if (e.valid && e.ext) m_ext_in++;
      if (e.valid && !e.ext) m_routed++;
      back_m[i] = dut.ib2_wr_data[k];
    end
    if (dut.swap && dut.in_sel) begin front_m = back_m; run_t = 0; swap_at.push_back(cyc_now); end
    if (dut.cap_valid) begin
      for (int i = 0; i < NIN; i++)
        check(dut.ca_in[i] == front_m[i][run_t], $sformatf("core input %0d at run clock %0d", i, run_t));
      run_t++;
    end
    if (dut.sm_wr_en) sm_m[dut.sm_wr_mod][dut.sm_wr_sig] = dut.sm_wr_data;
    if (ext_valid) begin
      rec_seq.push_back(int'(ext_mod));
    end
  end

  task automatic issue(input logic [1:0] c);
    int cyc;
    @(negedge clk); cmd_valid = 1; cmd = c;
    @(negedge clk); cmd_valid = 0;
    cyc = 0;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    check(done, $sformatf("command %0d completes", c));
  endtask

  function automatic int nbr(int i, int f);
    int x, y, z;
    x = i % X; y = (i / X) % Y; z = i / (X * Y);
    case (f)
      0: x = (x + 1) % X;      1: x = (x + X - 1) % X;
      2: y = (y + 1) % Y;      3: y = (y + Y - 1) % Y;
      4: z = (z + 1) % Z;      default: z = (z + Z - 1) % Z;
    endcase
    return x + X * (y + Y * z);
  endfunction

  initial begin
    cell_cfg_t g [N];
    cell_cfg_t p [N];
    int grown;
    m_grow = 0; m_sig = 0; m_clear = 0; m_swap = 0; m_breed = 0; m_slot = 0;
    m_ext_in = 0; m_routed = 0; m_record = 0; m_hsa = 0; m_active = 0;
    for (int m = 0; m < NMOD; m++) for (int s = 0; s < NSIG; s++) sm_m[m][s] = '0;
    // the Signal Memory has no reset: start it empty, as a host would
    for (int i = 0; i < NMOD * NSIG; i++) dut.u_sm.mem[i] = '0;
    for (int i = 0; i < NIN; i++) begin back_m[i] = '0; front_m[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // filter taps
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk); coef_we = 1; coef_idx = KW'(k); coef_data = CW'(coefs[k]);
    end
    @(negedge clk); coef_we = 0;
    // evaluation buffers: 40 steps, second test starts at step 20
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      ib_we = 1; ib_addr = BW'(t); ib_data = NIN'($urandom);
      tg_we = 1; tg_addr = BW'(t); tg_data = {t == 20, NSIG'($urandom)};
    end
    @(negedge clk); ib_we = 0; tg_we = 0;
    // genotypes at 0 and 32
    for (int base = 0; base <= 32; base += 32) begin
      for (int i = 0; i < N; i++) g[i] = '{ctype: CT_BLANK, dir: 3'd0, chrom: 6'($urandom)};
      for (int k = 0; k < 3; k++) g[(k * 17 + base) % N] = '{ctype: CT_NEURON, dir: 3'($urandom_range(0, 5)), chrom: 6'($urandom)};
      for (int i = 0; i < N; i++) mem.mem[base + i / LANES][i % LANES] = g[i];
    end

    // ---- 1. EVOLVE ----
    geno_addr = 0; pheno_addr = 16; grow_cycles = 12; sig_len = 40;
    issue(2'd0);
    check(fitness == 32'(ref_fit), $sformatf("fitness %0d, reference %0d", fitness, ref_fit));
    grown = 0;
    for (int i = 0; i < N; i++) begin
      g[i] = mem.mem[i / LANES][i % LANES];
      p[i] = mem.mem[16 + i / LANES][i % LANES];
    end
    for (int i = 0; i < N; i++) begin
      if (g[i].ctype == CT_NEURON) check(p[i] == g[i], "neuron kept in phenotype");
      if (g[i].ctype == CT_BLANK && p[i].ctype != CT_BLANK) begin
        grown++;
        check(p[i].dir < 6 && p[nbr(i, int'(p[i].dir))].ctype != CT_BLANK, $sformatf("grown cell %0d attached", i));
      end
    end
    check(grown > 0, "cells grew");

    // ---- 2. BREED ----
    ga_mut_rate = 0;
    parent_a = 0; parent_b = 32; geno_addr = 48;
    issue(2'd1);
    for (int i = 0; i < N; i++) begin
      cell_cfg_t a, b, o;
      a = mem.mem[i / LANES][i % LANES]; b = mem.mem[32 + i / LANES][i % LANES]; o = mem.mem[48 + i / LANES][i % LANES];
      check((((o.chrom ^ a.chrom) & (o.chrom ^ b.chrom)) == 0) &&
            ({o.ctype, o.dir} == {a.ctype, a.dir} || {o.ctype, o.dir} == {b.ctype, b.dir}), $sformatf("offspring cell %0d", i));
    end

    // ---- 3. RUN ----
    for (int r = 0; r < ROWS; r++) begin
      mem.mem[64 + r] = mem.mem[16 + r];       // module 0: the grown phenotype
      mem.mem[64 + ROWS + r] = mem.mem[16 + r]; // module 1: the same circuit
    end
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < NIN; i++) begin
        xr_m[m][i].valid   = (i != 5);
        xr_m[m][i].ext     = (m == 0);
        xr_m[m][i].src_mod = (m == 0) ? 15'(i) : 15'(i % 2);
        xr_m[m][i].src_sig = 2'(i % NSIG);
      end
    for (int m = 0; m < 2; m++)
      for (int pp = 0; pp < NIN / 2; pp++) begin
        @(negedge clk);
        xr_we = 1; xr_mod = MW'(m); xr_pair = PW'(pp);
        xr_data[0] = xr_m[m][2 * pp]; xr_data[1] = xr_m[m][2 * pp + 1];
      end
    @(negedge clk); xr_we = 0;
    pheno_addr = 64; n_mods = 2; n_passes = 3;
    issue(2'd2);
    repeat (5) @(negedge clk);
    check(rec_seq.size() == 6, $sformatf("six output records (%0d)", rec_seq.size()));
    for (int i = 0; i < rec_seq.size(); i++) check(rec_seq[i] == i % 2, "record order");
    for (int m = 0; m < 2; m++) for (int s = 0; s < NSIG; s++)
      check(dut.u_sm.mem[m * NSIG + s] == sm_m[m][s], "signal memory contents");
    check(swap_at.size() == 6, "six module slots");
    for (int i = 1; i < swap_at.size(); i++)
      check(swap_at[i] - swap_at[i - 1] == TRAIN + 2, $sformatf("slot length %0d", swap_at[i] - swap_at[i - 1]));

    // ---- 4. Hough spiker ----
    begin
      int sig [11] = '{1, 5, 13, 15, 7, 7, 6, 2, 9, 5, -2};
      bit exp_s [7] = '{1, 1, 0, 1, 0, 0, 1};
      int n; n = 0;
      for (int t = 0; t < 11; t++) begin
        @(negedge clk); hsa_in_valid = 1; hsa_sample = HSW'(sig[t]);
        @(posedge clk); #1;
        if (hsa_spike_valid) begin
          check(hsa_spike == exp_s[n], $sformatf("HSA bit %0d", n));
          n++;
        end
      end
      @(negedge clk); hsa_in_valid = 0;
      check(n == 7, "HSA decisions");
    end

    check(m_grow > 0, "mechanism: growth");
    check(m_sig > 0, "mechanism: signalling");
    check(m_clear > 0, "mechanism: multi-test clear");
    check(m_swap > 0, "mechanism: configuration swap");
    check(m_breed > 0, "mechanism: breeding");
    check(m_slot > 0, "mechanism: module slot");
    check(m_ext_in > 0, "mechanism: external input");
    check(m_routed > 0, "mechanism: routed input");
    check(m_record > 0, "mechanism: output record");
    check(m_hsa > 0, "mechanism: HSA spike");
    check(m_active > 0, "mechanism: output activity");
    $display("mechanisms: grow=%0d sig=%0d clear=%0d swap=%0d breed=%0d slot=%0d ext_in=%0d routed=%0d record=%0d hsa=%0d active=%0d",
             m_grow, m_sig, m_clear, m_swap, m_breed, m_slot, m_ext_in, m_routed, m_record, m_hsa, m_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
