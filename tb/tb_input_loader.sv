// tb_input_loader: gives the loader a random cross-reference list (Signal
// Memory sources, external sources and unconnected inputs) with memory
// models of one-clock latency, and checks that every input position is
// written exactly once with the right train, and that done comes NIN/2+3
// clocks after start.
module tb_input_loader;
  import cbm_pkg::*;
  localparam int NMOD = 8, NIN = 12, NSIG = 3, TRAIN = 16, NP = NIN / 2;
  localparam int MW = $clog2(NMOD), PW = $clog2(NP), SW = $clog2(NSIG), IW = $clog2(NIN);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [MW-1:0] mod_id = '0;
  logic xr_rd_en;
  logic [MW-1:0] xr_rd_mod;
  logic [PW-1:0] xr_rd_pair;
  xref_entry_t xr_rd_data [2];
  logic [1:0] sm_rd_en;
  logic [MW-1:0] sm_rd_mod [2];
  logic [SW-1:0] sm_rd_sig [2];
  logic [TRAIN-1:0] sm_rd_data [2];
  logic [14:0] ext_idx [2];
  logic [TRAIN-1:0] ext_train [2];
  logic [1:0] ib_wr_en;
  logic [IW-1:0] ib_wr_idx [2];
  logic [TRAIN-1:0] ib_wr_data [2];
  int checks = 0, failures = 0;

  input_loader #(.NMOD(NMOD), .NIN(NIN), .NSIG(NSIG), .TRAIN(TRAIN)) dut (.*);
  always #5 clk = ~clk;

  xref_entry_t xr [NMOD][NP][2];
  logic [TRAIN-1:0] sm [NMOD][NSIG];
  logic [TRAIN-1:0] got [NIN];
  int nwr [NIN];

  function automatic logic [TRAIN-1:0] ext_fn(int idx);
    return TRAIN'(idx * 40503 + 7);
  endfunction

  always @(posedge clk) begin
    if (xr_rd_en) begin
      xr_rd_data[0] <= xr[xr_rd_mod][xr_rd_pair][0];
      xr_rd_data[1] <= xr[xr_rd_mod][xr_rd_pair][1];
    end
    for (int k = 0; k < 2; k++) if (sm_rd_en[k]) sm_rd_data[k] <= sm[sm_rd_mod[k]][sm_rd_sig[k]];
    for (int k = 0; k < 2; k++) if (ib_wr_en[k]) begin
      got[ib_wr_idx[k]] <= ib_wr_data[k];
      nwr[ib_wr_idx[k]] <= nwr[ib_wr_idx[k]] + 1;
    end
  end
  always_comb for (int k = 0; k < 2; k++) ext_train[k] = ext_fn(int'(ext_idx[k]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int m = 0; m < NMOD; m++) begin
      for (int s = 0; s < NSIG; s++) sm[m][s] = TRAIN'($urandom);
      for (int p = 0; p < NP; p++) for (int k = 0; k < 2; k++) begin
        xr[m][p][k].valid   = ($urandom_range(0, 5) != 0);
        xr[m][p][k].ext     = ($urandom_range(0, 3) == 0);
        xr[m][p][k].src_mod = 15'($urandom_range(0, NMOD - 1));
        xr[m][p][k].src_sig = 2'($urandom_range(0, NSIG - 1));
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      int m, cyc;
      m = $urandom_range(0, NMOD - 1);
      for (int i = 0; i < NIN; i++) begin nwr[i] = 0; got[i] = '1; end
      @(negedge clk);
      start = 1; mod_id = MW'(m);
      @(negedge clk);
      start = 0; cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == NP + 3, $sformatf("done after NIN/2+3 clocks (%0d)", cyc));
      for (int i = 0; i < NIN; i++) begin
        xref_entry_t e;
        logic [TRAIN-1:0] exp_t;
        e = xr[m][i / 2][i % 2];
        exp_t = !e.valid ? '0 : e.ext ? ext_fn(int'(e.src_mod)) : sm[e.src_mod][e.src_sig];
        check(nwr[i] == 1 && got[i] == exp_t, $sformatf("module %0d input %0d", m, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
