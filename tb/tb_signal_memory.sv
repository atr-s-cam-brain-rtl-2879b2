// tb_signal_memory: stores random 96-bit trains for every module and
// output, then reads them through both read ports at once in random order,
// checking data and one-clock latency against a copy kept here, including a
// write and reads in the same clock.
module tb_signal_memory;
  localparam int NMOD = 8, NSIG = 3, TRAIN = 96, MW = $clog2(NMOD), SW = $clog2(NSIG);
  logic clk = 0, wr_en = 0;
  logic [MW-1:0] wr_mod = '0;
  logic [SW-1:0] wr_sig = '0;
  logic [TRAIN-1:0] wr_data = '0;
  logic [1:0] rd_en = '0;
  logic [MW-1:0] rd_mod [2];
  logic [SW-1:0] rd_sig [2];
  logic [TRAIN-1:0] rd_data [2];
  logic [TRAIN-1:0] model [NMOD][NSIG];
  int checks = 0, failures = 0;

  signal_memory #(.NMOD(NMOD), .NSIG(NSIG), .TRAIN(TRAIN)) dut (.*);
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
    for (int m = 0; m < NMOD; m++)
      for (int s = 0; s < NSIG; s++) begin
        @(negedge clk);
        wr_en = 1; wr_mod = MW'(m); wr_sig = SW'(s);
        wr_data = {$urandom, $urandom, $urandom};
        model[m][s] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      int m [2], s [2];
      for (int p = 0; p < 2; p++) begin
        m[p] = $urandom_range(0, NMOD - 1); s[p] = $urandom_range(0, NSIG - 1);
        rd_mod[p] = MW'(m[p]); rd_sig[p] = SW'(s[p]);
      end
      rd_en = 2'b11;
      // a write to another location in the same clock
      wr_en = (n % 5 == 0);
      wr_mod = MW'((m[0] + 1) % NMOD); wr_sig = SW'(s[0]);
      wr_data = {$urandom, $urandom, $urandom};
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++)
        check(rd_data[p] == model[m[p]][s[p]], $sformatf("port %0d mod %0d sig %0d", p, m[p], s[p]));
      if (wr_en) model[(m[0] + 1) % NMOD][s[0]] = wr_data;
      @(negedge clk);
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
