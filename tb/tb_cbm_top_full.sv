// tb_cbm_top_full: the CAM-Brain Machine at its full size (24x24x24 cells,
// 144-cell rows, 180 inputs, 96-bit trains, 32,768 modules, 20 taps) taken
// through one complete evolution of a module (load 96 rows, grow, signal
// 200 steps with two tests, save the phenotype) and a run of a two-module
// brain for one pass. Checks the fitness against a reference computed from
// the module outputs, the phenotype saved, the save time of 96 rows, the
// output records and the module slot length.
module tb_cbm_top_full;
  import cbm_pkg::*;
  localparam int LANES = 144, NIN = 180, NOUT = 4, NSIG = 3, TRAIN = 96, TAPS = 20, CW = 8;
  localparam int ROWS = 96, N = 13824, AW = 32;
  localparam int MW = 15, BW = 10, KW = 5, PW = 7;

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
  logic ga_seed_load = 0; logic [63:0] ga_seed = '0; logic [7:0] ga_mut_rate = '0;
  logic mem_req, mem_we; logic [AW-1:0] mem_addr;
  cell_cfg_t mem_wdata [LANES];
  cell_cfg_t mem_rdata [LANES];
  logic [14:0] ext_in_idx [2];
  logic [TRAIN-1:0] ext_in_train [2];
  logic ext_valid; logic [MW-1:0] ext_mod;
  logic [TRAIN-1:0] ext_trains [NOUT];
  logic hsa_clear = 0, hsa_in_valid = 0; logic signed [15:0] hsa_sample = '0;
  logic hsa_spike_valid, hsa_spike;
  int checks = 0, failures = 0;

  cbm_top dut (.*);
  row_memory_model #(.LANES(LANES), .WORDS(512), .AW(AW)) mem (.*);
  always #5 clk = ~clk;
  always_comb for (int k = 0; k < 2; k++) ext_in_train[k] = {3{32'(ext_in_idx[k]) * 32'h9E3779B1}};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // fitness reference (filter: samples of a bell shape, chosen here)
  int coefs [TAPS];
  bit ho [NSIG][$];
  bit ht [NSIG][$];
  longint ref_fit;
  int ld_start_at, ld_done_at, cyc_now = 0, n_grow = 0, n_clear = 0;
  int swap_at [$];
  int rec = 0;
  always @(posedge clk) if (rst_n) begin
    cyc_now++;
    if (dut.ld_start) ld_start_at = cyc_now;
    if (dut.ld_done) ld_done_at = cyc_now;
    if (dut.phase == PH_GROW) n_grow++;
    if (dut.swap && dut.in_sel) swap_at.push_back(cyc_now);
    if (ext_valid) rec++;
    if (dut.fe_start) begin
      ref_fit = 0;
      for (int c = 0; c < NSIG; c++) begin ho[c] = {}; ht[c] = {}; end
    end else if (dut.fe_in_valid) begin
      if (dut.fe_test_clear) n_clear++;
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
  end

  task automatic issue(input logic [1:0] c);
    int cyc;
    @(negedge clk); cmd_valid = 1; cmd = c;
    @(negedge clk); cmd_valid = 0;
    cyc = 0;
    while (!done && cyc < 50000) begin @(negedge clk); cyc++; end
    check(done, $sformatf("command %0d completes", c));
  endtask

  initial begin
    int grown;
    for (int k = 0; k < TAPS; k++) coefs[k] = 8 + (k * (19 - k)) * 57 / 90;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 32768 * NSIG; i++) dut.u_sm.mem[i] = '0;  // Signal Memory has no reset
    rst_n = 1;
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk); coef_we = 1; coef_idx = KW'(k); coef_data = CW'(coefs[k]);
    end
    @(negedge clk); coef_we = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      ib_we = 1; ib_addr = BW'(t); ib_data = {6{$urandom}};
      tg_we = 1; tg_addr = BW'(t); tg_data = {t == 100, NSIG'($urandom)};
    end
    @(negedge clk); ib_we = 0; tg_we = 0;
    // genotype at 0: blanks with random masks, one neuron per 2x2x3 block
    for (int i = 0; i < N; i++) mem.mem[i / LANES][i % LANES] = '{ctype: CT_BLANK, dir: 3'd0, chrom: 6'($urandom)};
    for (int b = 0; b < N / 12; b += 7) begin
      int x, y, z, i;
      x = 2 * (b % 12); y = 2 * ((b / 12) % 12); z = 3 * (b / 144);
      i = x + 24 * (y + 24 * z);
      mem.mem[i / LANES][i % LANES] = '{ctype: CT_NEURON, dir: 3'($urandom_range(0, 5)), chrom: 6'($urandom)};
    end
    geno_addr = 0; pheno_addr = 96; grow_cycles = 40; sig_len = 200;
    issue(2'd0);
    check(fitness == 32'(ref_fit), $sformatf("fitness %0d, reference %0d", fitness, ref_fit));
    check(n_grow == 40, "grow clocks");
    check(n_clear == 1, "multi-test clear");
    grown = 0;
    for (int i = 0; i < N; i++) begin
      cell_cfg_t g, p;
      g = mem.mem[i / LANES][i % LANES]; p = mem.mem[96 + i / LANES][i % LANES];
      if (g.ctype == CT_NEURON) check(p == g, "neuron kept");
      if (g.ctype == CT_BLANK && p.ctype != CT_BLANK) grown++;
    end
    check(grown > 100, $sformatf("cells grew (%0d)", grown));
    check(ld_done_at - ld_start_at == ROWS + 1, $sformatf("phenotype save timing (%0d)", ld_done_at - ld_start_at));
    // run: modules 0 and 1 use the grown phenotype
    for (int r = 0; r < ROWS; r++) begin mem.mem[192 + r] = mem.mem[96 + r]; mem.mem[288 + r] = mem.mem[96 + r]; end
    for (int m = 0; m < 2; m++)
      for (int pp = 0; pp < NIN / 2; pp++) begin
        @(negedge clk);
        xr_we = 1; xr_mod = MW'(m); xr_pair = PW'(pp);
        for (int k = 0; k < 2; k++)
          xr_data[k] = '{valid: 1'b1, ext: (m == 0), src_mod: 15'((2 * pp + k) % (m == 0 ? 180 : 2)), src_sig: 2'(k)};
      end
    @(negedge clk); xr_we = 0;
    pheno_addr = 192; n_mods = 2; n_passes = 1;
    issue(2'd2);
    repeat (5) @(negedge clk);
    check(rec == 2, "two output records");
    check(swap_at.size() == 2, "two module slots");
    if (swap_at.size() == 2) begin
      $display("module slot length at full size: %0d clocks", swap_at[1] - swap_at[0]);
      check(swap_at[1] - swap_at[0] == ROWS + 4, "slot length ROWS+4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
