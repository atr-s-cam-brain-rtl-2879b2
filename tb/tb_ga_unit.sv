// tb_ga_unit: checks every offspring word against a reference of the GA
// rule computed here from an independent copy of the xorshift mask
// generator: chrom = (pa & xmask | pb & ~xmask) ^ mutation mask, neuron
// fields from the parent chosen by xsel, one-clock latency, reseeding, and
// the mutation rate (none at rate 0, about half the bits at rate 128).
module tb_ga_unit;
  import cbm_pkg::*;
  localparam int LANES = 4;
  logic clk = 0, rst_n = 0, seed_load = 0, in_valid = 0, out_valid;
  logic [63:0] seed = '0;
  logic [7:0] mut_rate = '0;
  cell_cfg_t pa [LANES];
  cell_cfg_t pb [LANES];
  cell_cfg_t offspring [LANES];
  int checks = 0, failures = 0;

  ga_unit #(.LANES(LANES)) dut (.*);
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

  function automatic logic [63:0] step(logic [63:0] s);
    s = s ^ (s << 13); s = s ^ (s >> 7); s = s ^ (s << 17);
    return s;
  endfunction

  logic [63:0] rs [LANES];
  int flips, bits;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    seed_load = 1; seed = 64'h0123_4567_89AB_CDEF;
    @(negedge clk);
    seed_load = 0;
    for (int l = 0; l < LANES; l++) rs[l] = seed ^ (64'h9E37_79B9_7F4A_7C15 * 64'(l + 1));
    for (int rate_i = 0; rate_i < 3; rate_i++) begin
      mut_rate = (rate_i == 0) ? 8'd0 : (rate_i == 1) ? 8'd128 : 8'd10;
      flips = 0; bits = 0;
      for (int n = 0; n < 200; n++) begin
        cell_cfg_t e [LANES];
        for (int l = 0; l < LANES; l++) begin
          logic [5:0] xm, mm;
          pa[l] = cell_cfg_t'($urandom); pb[l] = cell_cfg_t'($urandom);
          xm = rs[l][5:0];
          for (int i = 0; i < 6; i++) mm[i] = (rs[l][8 * i + 8 +: 8] < mut_rate);
          e[l].chrom = ((pa[l].chrom & xm) | (pb[l].chrom & ~xm)) ^ mm;
          e[l].ctype = rs[l][6] ? pa[l].ctype : pb[l].ctype;
          e[l].dir   = rs[l][6] ? pa[l].dir : pb[l].dir;
          for (int i = 0; i < 6; i++) begin flips += mm[i]; bits++; end
          rs[l] = step(rs[l]);
        end
        in_valid = 1;
        @(posedge clk); #1;
        check(out_valid, "out_valid one clock after in_valid");
        for (int l = 0; l < LANES; l++) check(offspring[l] == e[l], $sformatf("rate %0d n %0d lane %0d", mut_rate, n, l));
        @(negedge clk);
        in_valid = 0;
        if (n % 7 == 3) begin
          @(posedge clk); #1;
          check(!out_valid, "no output without input");
          @(negedge clk);
        end
      end
      if (mut_rate == 0) check(flips == 0, "no mutation at rate 0");
      if (mut_rate == 128) check(flips > bits / 3 && flips < 2 * bits / 3, $sformatf("half the bits mutate at rate 128 (%0d/%0d)", flips, bits));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
