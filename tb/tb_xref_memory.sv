// tb_xref_memory: writes random entry pairs for every module and pair slot,
// reads them back in random order and checks them (and the one-clock read
// latency) against a copy kept in this testbench.
module tb_xref_memory;
  import cbm_pkg::*;
  localparam int NMOD = 8, NIN = 12, NP = NIN / 2, MW = $clog2(NMOD), PW = $clog2(NP);
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [MW-1:0] wr_mod = '0, rd_mod = '0;
  logic [PW-1:0] wr_pair = '0, rd_pair = '0;
  xref_entry_t wr_data [2];
  xref_entry_t rd_data [2];
  xref_entry_t model [NMOD][NP][2];
  int checks = 0, failures = 0;

  xref_memory #(.NMOD(NMOD), .NIN(NIN)) dut (.*);
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
      for (int p = 0; p < NP; p++) begin
        @(negedge clk);
        wr_en = 1; wr_mod = MW'(m); wr_pair = PW'(p);
        for (int k = 0; k < 2; k++) begin
          wr_data[k] = xref_entry_t'($urandom);
          model[m][p][k] = wr_data[k];
        end
      end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 200; n++) begin
      int m, p;
      m = $urandom_range(0, NMOD - 1); p = $urandom_range(0, NP - 1);
      rd_en = 1; rd_mod = MW'(m); rd_pair = PW'(p);
      @(posedge clk); #1;
      check(rd_data[0] == model[m][p][0] && rd_data[1] == model[m][p][1], $sformatf("mod %0d pair %0d", m, p));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
