// tb_ext_interface: captures random output bits for a number of module
// slots, emits each, and checks the external record (module number and the
// four trains, bit t = output of run clock t) and the three Signal Memory
// writes that follow, against trains collected here.
module tb_ext_interface;
  localparam int NMOD = 8, NOUT = 4, NSIG = 3, TRAIN = 16;
  localparam int MW = $clog2(NMOD), SW = $clog2(NSIG);
  logic clk = 0, rst_n = 0, cap_valid = 0, emit = 0;
  logic [NOUT-1:0] cap_bits = '0;
  logic [MW-1:0] mod_id = '0;
  logic ext_valid;
  logic [MW-1:0] ext_mod;
  logic [TRAIN-1:0] ext_trains [NOUT];
  logic sm_wr_en;
  logic [MW-1:0] sm_wr_mod;
  logic [SW-1:0] sm_wr_sig;
  logic [TRAIN-1:0] sm_wr_data;
  int checks = 0, failures = 0;

  ext_interface #(.NMOD(NMOD), .NOUT(NOUT), .NSIG(NSIG), .TRAIN(TRAIN)) dut (.*);
  always #5 clk = ~clk;

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
    logic [TRAIN-1:0] exp_t [NOUT];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int slot = 0; slot < 6; slot++) begin
      int m, nw;
      m = $urandom_range(0, NMOD - 1);
      for (int o = 0; o < NOUT; o++) exp_t[o] = '0;
      for (int t = 0; t < TRAIN; t++) begin
        cap_valid = 1; cap_bits = NOUT'($urandom);
        for (int o = 0; o < NOUT; o++) exp_t[o][t] = cap_bits[o];
        @(negedge clk);
        if (t == 5) begin cap_valid = 0; @(negedge clk); end   // a gap is not captured
      end
      cap_valid = 0;
      emit = 1; mod_id = MW'(m);
      @(negedge clk);
      emit = 0;
      check(ext_valid && ext_mod == MW'(m), "external record valid with module number");
      for (int o = 0; o < NOUT; o++) check(ext_trains[o] == exp_t[o], $sformatf("slot %0d train %0d", slot, o));
      nw = 0;
      for (int c = 0; c < 6; c++) begin
        if (sm_wr_en) begin
          check(sm_wr_mod == MW'(m) && int'(sm_wr_sig) == nw && sm_wr_data == exp_t[nw], $sformatf("signal memory write %0d", nw));
          nw++;
        end
        @(negedge clk);
      end
      check(nw == NSIG, "three trains written to the Signal Memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
