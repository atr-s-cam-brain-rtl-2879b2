// tb_config_loader: runs LOAD, SAVE and BREED against a behavioural row
// memory, a model of the CA shadow rows and a stand-in GA (offspring =
// parent A xor parent B, one clock). Checks every row that arrives and the
// cycle count of each operation (LOAD: ROWS+2 clocks from start to done).
module tb_config_loader;
  import cbm_pkg::*;
  localparam int LANES = 4, ROWS = 6, AW = 32, RW = $clog2(ROWS);
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] op = '0;
  logic [AW-1:0] addr_a = '0, addr_b = '0, addr_o = '0;
  logic busy, done, mem_req, mem_we, cfg_we, ga_valid;
  logic [AW-1:0] mem_addr;
  cell_cfg_t mem_wdata [LANES];
  cell_cfg_t mem_rdata [LANES];
  logic [RW-1:0] cfg_row, rd_row;
  cell_cfg_t cfg_wdata [LANES];
  cell_cfg_t rd_data [LANES];
  cell_cfg_t ga_pa [LANES];
  cell_cfg_t ga_pb [LANES];
  cell_cfg_t ga_off [LANES];
  logic ga_out_valid = 0;
  int checks = 0, failures = 0;

  config_loader #(.LANES(LANES), .ROWS(ROWS), .AW(AW)) dut (.*);
  row_memory_model #(.LANES(LANES), .WORDS(64), .AW(AW)) mem (.*);
  always #5 clk = ~clk;

  // CA shadow model
  cell_cfg_t shadow [ROWS][LANES];
  always @(posedge clk) if (cfg_we) for (int l = 0; l < LANES; l++) shadow[cfg_row][l] <= cfg_wdata[l];
  always_comb for (int l = 0; l < LANES; l++) rd_data[l] = shadow[rd_row][l];
  // GA stand-in
  always @(posedge clk) begin
    ga_out_valid <= ga_valid;
    if (ga_valid) for (int l = 0; l < LANES; l++) ga_off[l] <= ga_pa[l] ^ ga_pb[l];
  end

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

  task automatic go(input logic [1:0] o, input int a, input int b, input int c, output int cyc);
    @(negedge clk);
    start = 1; op = o; addr_a = AW'(a); addr_b = AW'(b); addr_o = AW'(c);
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int l = 0; l < LANES; l++) begin
        mem.mem[10 + r][l] = cell_cfg_t'($urandom);
        mem.mem[20 + r][l] = cell_cfg_t'($urandom);
        mem.mem[30 + r][l] = cell_cfg_t'($urandom);
        shadow[r][l] = '0;
      end
    // LOAD
    go(2'd0, 10, 0, 0, cyc);
    check(cyc == ROWS + 2, $sformatf("LOAD takes ROWS+2 clocks (%0d)", cyc));
    for (int r = 0; r < ROWS; r++) for (int l = 0; l < LANES; l++)
      check(shadow[r][l] == mem.mem[10 + r][l], $sformatf("LOAD row %0d lane %0d", r, l));
    // SAVE the shadow to 40..
    for (int r = 0; r < ROWS; r++) for (int l = 0; l < LANES; l++) shadow[r][l] = cell_cfg_t'($urandom);
    go(2'd1, 40, 0, 0, cyc);
    check(cyc == ROWS + 1, $sformatf("SAVE takes ROWS+1 clocks (%0d)", cyc));
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) for (int l = 0; l < LANES; l++)
      check(mem.mem[40 + r][l] == shadow[r][l], $sformatf("SAVE row %0d lane %0d", r, l));
    // BREED 20 x 30 -> 50
    go(2'd2, 20, 30, 50, cyc);
    check(cyc == 4 * ROWS + 1, $sformatf("BREED takes 4 clocks per row (%0d)", cyc));
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) for (int l = 0; l < LANES; l++)
      check(mem.mem[50 + r][l] == (mem.mem[20 + r][l] ^ mem.mem[30 + r][l]), $sformatf("BREED row %0d lane %0d", r, l));
    check(mem.mem[10][0] != '0 || mem.mem[11][0] != '0, "source rows untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
