// tb_siic_convolver: checks the SIIC filter on the worked example (filter
// 1 4 9 5 -2, spiketrain 1101001 gives 1 5 13 15 7 7 6 2 9 5 -2), its
// one-clock latency, the clear input, and random trains against a direct
// evaluation of y(t) = sum h[k] s(t-k) in this testbench.
module tb_siic_convolver;
  localparam int TAPS = 5, CW = 8, OW = CW + $clog2(TAPS) + 1;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, spike = 0;
  logic signed [CW-1:0] coef [TAPS];
  logic y_valid;
  logic signed [OW-1:0] y_out;
  int checks = 0, failures = 0;

  siic_convolver #(.TAPS(TAPS), .CW(CW)) dut (.*);
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

  int expv [11] = '{1, 5, 13, 15, 7, 7, 6, 2, 9, 5, -2};
  bit train [11] = '{1, 1, 0, 1, 0, 0, 1, 0, 0, 0, 0};
  bit hist [$];

  initial begin
    coef = '{8'sd1, 8'sd4, 8'sd9, 8'sd5, -8'sd2};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 11; t++) begin
      @(negedge clk);
      in_valid = 1; spike = train[t];
      @(posedge clk); #1;
      check(y_valid && y_out == expv[t], $sformatf("example t=%0d got %0d", t, y_out));
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    check(!y_valid, "y_valid follows in_valid");
    // random filter and train
    for (int k = 0; k < TAPS; k++) coef[k] = 8'($urandom_range(0, 255));
    hist = {};
    for (int t = 0; t < 300; t++) begin
      int e;
      @(negedge clk);
      in_valid = 1; spike = $urandom_range(0, 1); clear = (t % 77 == 40);
      if (clear) hist = {};
      hist.push_front(spike);
      e = 0;
      for (int k = 0; k < TAPS && k < hist.size(); k++) if (hist[k]) e += int'(coef[k]);
      @(posedge clk); #1;
      check(y_out == OW'(e), $sformatf("random t=%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
