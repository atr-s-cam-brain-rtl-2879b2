// tb_hsa_spiker: checks the Hough spiker on the worked example (signal
// 1 5 13 15 7 7 6 2 9 5 -2 with filter 1 4 9 5 -2 gives 1101001) and on
// random signals against a whole-array version of the algorithm computed
// here: for t = 0, 1, ...: if every tap h[k] <= s[t+k], emit 1 and subtract
// the filter from s[t..t+TAPS-1], else emit 0. Also checks the latency of
// TAPS-1 samples.
module tb_hsa_spiker;
  localparam int TAPS = 5, CW = 8, SW = 16;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [CW-1:0] coef [TAPS];
  logic signed [SW-1:0] sample = '0;
  logic spike_valid, spike;
  int checks = 0, failures = 0;

  hsa_spiker #(.TAPS(TAPS), .CW(CW), .SW(SW)) dut (.*);
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

  task automatic run(input int sig [], output bit got [$], output int first_at);
    got = {}; first_at = -1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int t = 0; t < sig.size(); t++) begin
      in_valid = 1; sample = SW'(sig[t]);
      @(posedge clk); #1;
      if (spike_valid) begin
        got.push_back(spike);
        if (first_at < 0) first_at = t;
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    int sig [];
    int sref [];
    bit got [$];
    int first_at;
    bit expect_ex [7] = '{1, 1, 0, 1, 0, 0, 1};
    coef = '{8'sd1, 8'sd4, 8'sd9, 8'sd5, -8'sd2};
    repeat (2) @(negedge clk);
    rst_n = 1;
    sig = '{1, 5, 13, 15, 7, 7, 6, 2, 9, 5, -2};
    run(sig, got, first_at);
    check(got.size() == 7, "example: seven spikes decided");
    check(first_at == TAPS - 1, "first decision after TAPS-1 samples");
    for (int t = 0; t < 7 && t < got.size(); t++) check(got[t] == expect_ex[t], $sformatf("example bit %0d", t));
    // random signals, reference algorithm on the whole array
    for (int trial = 0; trial < 20; trial++) begin
      int len;
      for (int k = 0; k < TAPS; k++) coef[k] = CW'($urandom_range(0, 40) - 5);
      len = $urandom_range(TAPS + 5, 120);
      sig = new[len];
      for (int t = 0; t < len; t++) sig[t] = $urandom_range(0, 300) - 20;
      sref = sig;
      run(sig, got, first_at);
      check(got.size() == len - TAPS + 1, "number of decisions");
      for (int t = 0; t + TAPS <= len; t++) begin
        bit sp; sp = 1;
        for (int k = 0; k < TAPS; k++) if (int'(coef[k]) > sref[t + k]) sp = 0;
        if (sp) for (int k = 0; k < TAPS; k++) sref[t + k] -= int'(coef[k]);
        if (t < got.size()) check(got[t] == sp, $sformatf("trial %0d bit %0d", trial, t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
