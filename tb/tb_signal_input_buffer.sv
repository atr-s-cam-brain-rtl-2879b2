// tb_signal_input_buffer: fills the back bank with random trains through
// both write ports while the front bank is being read, swaps, and checks
// every vector bit vec[i] = train i bit t against a copy kept here. Checks
// that writes never disturb the bank being read.
module tb_signal_input_buffer;
  localparam int NIN = 12, TRAIN = 16, IW = $clog2(NIN), TW = $clog2(TRAIN);
  logic clk = 0, rst_n = 0, swap = 0;
  logic [1:0] wr_en = '0;
  logic [IW-1:0] wr_idx [2];
  logic [TRAIN-1:0] wr_data [2];
  logic [TW-1:0] rd_t = '0;
  logic [NIN-1:0] vec;
  logic [TRAIN-1:0] front_m [NIN];
  logic [TRAIN-1:0] back_m [NIN];
  int checks = 0, failures = 0;

  signal_input_buffer #(.NIN(NIN), .TRAIN(TRAIN)) dut (.*);
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
    for (int i = 0; i < NIN; i++) begin front_m[i] = '0; back_m[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      for (int p = 0; p < NIN / 2; p++) begin
        wr_en = 2'b11;
        for (int k = 0; k < 2; k++) begin
          wr_idx[k] = IW'(2 * p + k);
          wr_data[k] = TRAIN'($urandom);
          back_m[2 * p + k] = wr_data[k];
        end
        rd_t = TW'($urandom_range(0, TRAIN - 1)); #1;
        for (int i = 0; i < NIN; i++) check(vec[i] == front_m[i][rd_t], "front bank unchanged while filling");
        @(negedge clk);
      end
      wr_en = '0;
      swap = 1; @(negedge clk); swap = 0;
      front_m = back_m;
      for (int t = 0; t < TRAIN; t++) begin
        rd_t = TW'(t); #1;
        for (int i = 0; i < NIN; i++) check(vec[i] == front_m[i][t], $sformatf("round %0d input %0d bit %0d", round, i, t));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
