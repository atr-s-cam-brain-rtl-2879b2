// tb_cbm_controller: drives the three commands with stand-in responders for
// the loaders and the fitness evaluator, and checks the sequence: for
// EVOLVE the load address, two swaps, grow_cycles growth clocks with
// alternating sub-steps, sig_len signalling steps with the multi-test clear
// applied where the target flags it, then the save; for BREED the three
// addresses; for RUN the module order, phenotype addresses, TRAIN capture
// clocks per slot, one emit per slot and the slot length.
module tb_cbm_controller;
  import cbm_pkg::*;
  localparam int NMOD = 8, ROWS = 6, TRAIN = 16, DEPTH = 64, AW = 32;
  localparam int MW = $clog2(NMOD), BW = $clog2(DEPTH), TW = $clog2(TRAIN);
  localparam int LD_LAT = ROWS + 2, IL_LAT = 10;
  logic clk = 0, rst_n = 0, cmd_valid = 0;
  logic [1:0] cmd = '0;
  logic [AW-1:0] geno_addr = '0, pheno_addr = '0, parent_a = '0, parent_b = '0;
  logic [15:0] grow_cycles = '0, n_passes = '0;
  logic [BW:0] sig_len = '0;
  logic [MW:0] n_mods = '0;
  logic busy, done, ld_start, ld_done = 0;
  logic [1:0] ld_op;
  logic [AW-1:0] ld_a, ld_b, ld_o;
  ca_phase_e phase;
  logic axon_tick, sig_clear, swap, in_sel, eb_rd_en;
  logic [BW-1:0] eb_rd_addr;
  logic tgt_clear = 0;
  logic fe_start, fe_in_valid, fe_last, fe_test_clear, fe_done = 0;
  logic il_start, il_done = 0;
  logic [MW-1:0] il_mod, emit_mod;
  logic [TW-1:0] sib_rd_t;
  logic cap_valid, emit;
  int checks = 0, failures = 0;

  cbm_controller #(.NMOD(NMOD), .ROWS(ROWS), .TRAIN(TRAIN), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // responders
  int ld_cnt = -1, il_cnt = -1, fe_cnt = -1;
  logic [1:0] last_op;
  logic [AW-1:0] last_a, last_b, last_o;
  logic clear_flags [DEPTH];
  always @(posedge clk) begin
    ld_done <= 0; il_done <= 0; fe_done <= 0;
    if (ld_start) begin ld_cnt <= LD_LAT - 1; last_op <= ld_op; last_a <= ld_a; last_b <= ld_b; last_o <= ld_o; end
    else if (ld_cnt > 0) ld_cnt <= ld_cnt - 1;
    else if (ld_cnt == 0) begin ld_done <= 1; ld_cnt <= -1; end
    if (il_start) il_cnt <= IL_LAT - 1;
    else if (il_cnt > 0) il_cnt <= il_cnt - 1;
    else if (il_cnt == 0) begin il_done <= 1; il_cnt <= -1; end
    if (fe_in_valid && fe_last) fe_cnt <= 1;
    else if (fe_cnt > 0) fe_cnt <= fe_cnt - 1;
    else if (fe_cnt == 0) begin fe_done <= 1; fe_cnt <= -1; end
    if (eb_rd_en) tgt_clear <= clear_flags[eb_rd_addr];
  end

  // event counters
  int n_swap, n_grow, n_sig, n_clear, n_clear_exp, n_fe_start, n_last, n_cap, n_emit, n_alt_err;
  logic prev_tick; bit prev_grow;
  int emit_seq [$];
  logic [AW-1:0] load_addr_seq [$];
  int swap_at [$];
  int cyc_now = 0;
  always @(posedge clk) if (rst_n) begin
    if (swap) n_swap++;
    if (phase == PH_GROW) begin
      n_grow++;
      if (prev_grow && axon_tick == prev_tick) n_alt_err++;
    end
    prev_grow = (phase == PH_GROW); prev_tick = axon_tick;
    if (fe_in_valid) n_sig++;
    if (fe_in_valid && fe_test_clear && sig_clear) n_clear++;
    if (fe_start) n_fe_start++;
    if (fe_last) n_last++;
    if (cap_valid) n_cap++;
    if (emit) begin n_emit++; emit_seq.push_back(int'(emit_mod)); end
    if (ld_start && ld_op == 2'd0) load_addr_seq.push_back(ld_a);
    if (swap && in_sel) swap_at.push_back(cyc_now);
    cyc_now++;
  end

  task automatic reset_counts();
    n_swap = 0; n_grow = 0; n_sig = 0; n_clear = 0; n_fe_start = 0; n_last = 0;
    n_cap = 0; n_emit = 0; n_alt_err = 0; emit_seq = {}; load_addr_seq = {}; swap_at = {};
  endtask

  task automatic issue(input logic [1:0] c);
    int cyc;
    @(negedge clk); cmd_valid = 1; cmd = c;
    @(negedge clk); cmd_valid = 0;
    cyc = 0;
    while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
    check(done, "command completes");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- EVOLVE ----
    n_clear_exp = 0;
    for (int a = 0; a < DEPTH; a++) begin
      clear_flags[a] = (a == 7 || a == 15);
      if (a < 20 && clear_flags[a]) n_clear_exp++;
    end
    reset_counts();
    geno_addr = 100; pheno_addr = 200; grow_cycles = 11; sig_len = 20;
    issue(2'd0);
    check(load_addr_seq.size() == 1 && load_addr_seq[0] == 100, "genotype loaded from geno_addr");
    check(last_op == 2'd1 && last_a == 200, "phenotype saved to pheno_addr");
    check(n_swap == 2, $sformatf("two swaps (%0d)", n_swap));
    check(n_grow == 11, $sformatf("grow clocks (%0d)", n_grow));
    check(n_alt_err == 0, "grow sub-steps alternate");
    check(n_sig == 20, $sformatf("signalling steps (%0d)", n_sig));
    check(n_fe_start == 1 && n_last == 1, "one fitness start, one last");
    check(n_clear == n_clear_exp, $sformatf("multi-test clears (%0d)", n_clear));
    // ---- BREED ----
    reset_counts();
    parent_a = 300; parent_b = 400; geno_addr = 500;
    issue(2'd1);
    check(last_op == 2'd2 && last_a == 300 && last_b == 400 && last_o == 500, "breed addresses");
    // ---- RUN ----
    reset_counts();
    pheno_addr = 1000; n_mods = 3; n_passes = 2;
    issue(2'd2);
    check(n_emit == 6, $sformatf("one emit per slot (%0d)", n_emit));
    for (int i = 0; i < emit_seq.size(); i++) check(emit_seq[i] == i % 3, $sformatf("module order %0d", i));
    check(load_addr_seq.size() == 6, "six phenotype loads");
    for (int i = 0; i < load_addr_seq.size(); i++)
      check(load_addr_seq[i] == 1000 + (i % 3) * ROWS, $sformatf("phenotype address %0d", i));
    check(n_cap == 6 * TRAIN, $sformatf("TRAIN capture clocks per slot (%0d)", n_cap));
    check(swap_at.size() == 6, $sformatf("one swap per slot (%0d)", swap_at.size()));
    for (int i = 1; i < swap_at.size(); i++)
      check(swap_at[i] - swap_at[i - 1] == 1 + TRAIN + 1, $sformatf("slot length %0d", swap_at[i] - swap_at[i - 1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
