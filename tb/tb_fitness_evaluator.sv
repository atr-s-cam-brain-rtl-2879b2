// tb_fitness_evaluator: drives random output and target spiketrains with
// multi-test clears through the fitness evaluator and compares the final
// fitness with a reference computed here: for every clock and channel the
// absolute difference of the two filtered waveforms, summed. Also checks
// that done rises exactly two clocks after the last vector.
module tb_fitness_evaluator;
  localparam int NCH = 3, TAPS = 6, CW = 8;
  logic clk = 0, rst_n = 0;
  logic signed [CW-1:0] coef [TAPS];
  logic start = 0, test_clear = 0, in_valid = 0, last = 0;
  logic [NCH-1:0] out_spk = '0, tgt_spk = '0;
  logic [31:0] fitness;
  logic done;
  int checks = 0, failures = 0;

  fitness_evaluator #(.NCH(NCH), .TAPS(TAPS), .CW(CW), .FW(32)) dut (.*);
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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      bit ho [NCH][$];
      bit ht [NCH][$];
      longint ref_fit;
      int len, cyc;
      for (int k = 0; k < TAPS; k++) coef[k] = CW'($urandom_range(0, 255));
      for (int c = 0; c < NCH; c++) begin ho[c] = {}; ht[c] = {}; end
      ref_fit = 0;
      len = $urandom_range(20, 200);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int t = 0; t < len; t++) begin
        in_valid = 1;
        out_spk = NCH'($urandom); tgt_spk = NCH'($urandom);
        test_clear = (t > 0) && ($urandom_range(0, 30) == 0);
        last = (t == len - 1);
        for (int c = 0; c < NCH; c++) begin
          int yo, yt;
          if (test_clear) begin ho[c] = {}; ht[c] = {}; end
          ho[c].push_front(out_spk[c]); ht[c].push_front(tgt_spk[c]);
          yo = 0; yt = 0;
          for (int k = 0; k < TAPS && k < ho[c].size(); k++) begin
            if (ho[c][k]) yo += int'(coef[k]);
            if (ht[c][k]) yt += int'(coef[k]);
          end
          ref_fit += (yo > yt) ? yo - yt : yt - yo;
        end
        @(negedge clk);
      end
      in_valid = 0; last = 0; test_clear = 0;
      cyc = 0;
      while (!done && cyc < 10) begin @(negedge clk); cyc++; end
      check(cyc == 1, $sformatf("done latency (%0d)", cyc));
      check(done && fitness == 32'(ref_fit), $sformatf("run %0d fitness %0d expected %0d", run, fitness, ref_fit));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
