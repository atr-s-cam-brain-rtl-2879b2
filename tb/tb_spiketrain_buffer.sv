// tb_spiketrain_buffer: writes random vectors, then reads them back one per
// clock as the signalling sequencer does, checking data and the one-clock
// read latency against a copy kept in this testbench.
module tb_spiketrain_buffer;
  localparam int W = 180, DEPTH = 64, AW = $clog2(DEPTH);
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  spiketrain_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);
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
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a);
      wr_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int a = 0; a < DEPTH; a++) begin
        logic [W-1:0] prev_q;
        @(negedge clk);
        rd_en = 1; rd_addr = AW'(a);
        prev_q = rd_data;
        @(posedge clk); #1;
        check(rd_data == model[a], $sformatf("read %0d", a));
        if (a > 0) check(prev_q == model[a - 1], "data changes only on the clock after rd_en");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
