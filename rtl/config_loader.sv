// config_loader: genotype/phenotype memory controller (the role of the
// per-board CPLD), moving cell configurations between the memory and the CA.
//
// The memory is seen as words of one configuration row (LANES cells of
// CFG_W bits; one row is what the 72 boards move together in one clock) with
// a fixed read latency of one clock. A module occupies ROWS consecutive
// words starting at a base address. Three operations, started by a one-clock
// pulse with the operation code and addresses:
//   OP_LOAD:  read rows base..base+ROWS-1 and write them into the CA shadow
//             registers (pipelined: row r is read in clock r and written in
//             clock r+1, done after ROWS+1 clocks; 97 at the defaults).
//   OP_SAVE:  read the CA shadow rows (a grown phenotype after a swap) and
//             write them to the memory, one row per clock.
//   OP_BREED: for each row read parent A, then parent B, pass both through
//             the GA unit and write the offspring row (4 clocks per row).
// done pulses for one clock at the end of each operation.
// From the original CBM description: configurations are loaded and saved under CPLD control
// from per-board DRAM over a 32-bit path, loading overlaps running, and the
// genetic phase makes offspring in hardware. The row-wide word, the fixed
// latency and the operation sequencing are this design's choice.
module config_loader
  import cbm_pkg::*;
#(
  parameter int unsigned LANES = 144,
  parameter int unsigned ROWS  = 96,
  parameter int unsigned AW    = 32,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1:0]    op,        // 0 load, 1 save, 2 breed
  input  logic [AW-1:0] addr_a,    // load/save base, or parent A
  input  logic [AW-1:0] addr_b,    // parent B
  input  logic [AW-1:0] addr_o,    // offspring
  output logic          busy,
  output logic          done,
  // memory port
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output cell_cfg_t     mem_wdata [LANES],
  input  cell_cfg_t     mem_rdata [LANES],
  // CA configuration port
  output logic          cfg_we,
  output logic [RW-1:0] cfg_row,
  output cell_cfg_t     cfg_wdata [LANES],
  output logic [RW-1:0] rd_row,
  input  cell_cfg_t     rd_data   [LANES],
  // GA unit port
  output logic          ga_valid,
  output cell_cfg_t     ga_pa     [LANES],
  output cell_cfg_t     ga_pb     [LANES],
  input  logic          ga_out_valid,
  input  cell_cfg_t     ga_off    [LANES]
);

  localparam logic [1:0] OP_LOAD = 2'd0, OP_SAVE = 2'd1, OP_BREED = 2'd2;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SAVE, S_RA, S_RB, S_GA, S_WO} state_e;
  state_e        st;
  logic [RW-1:0] row;
  logic          wr_pend;          // load: a read is in flight
  logic [RW-1:0] wr_row;
  logic [AW-1:0] base_a, base_b, base_o;
  cell_cfg_t     pa_q [LANES];

  assign busy = (st != S_IDLE) || wr_pend;

  always_comb begin
    mem_req  = 1'b0;
    mem_we   = 1'b0;
    mem_addr = '0;
    rd_row   = row;
    ga_valid = 1'b0;
    unique case (st)
      S_LOAD: begin mem_req = 1'b1; mem_addr = base_a + AW'(row); end
      S_SAVE: begin mem_req = 1'b1; mem_we = 1'b1; mem_addr = base_a + AW'(row); end
      S_RA:   begin mem_req = 1'b1; mem_addr = base_a + AW'(row); end
      S_RB:   begin mem_req = 1'b1; mem_addr = base_b + AW'(row); end
      S_GA:   ga_valid = 1'b1;
      S_WO:   begin mem_req = ga_out_valid; mem_we = ga_out_valid; mem_addr = base_o + AW'(row); end
      default: ;
    endcase
    for (int l = 0; l < int'(LANES); l++) begin
      mem_wdata[l] = (st == S_SAVE) ? rd_data[l] : ga_off[l];
      cfg_wdata[l] = mem_rdata[l];
      ga_pa[l]     = pa_q[l];
      ga_pb[l]     = mem_rdata[l];
    end
    cfg_we  = wr_pend;
    cfg_row = wr_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      row     <= '0;
      wr_pend <= 1'b0;
      wr_row  <= '0;
      base_a  <= '0;
      base_b  <= '0;
      base_o  <= '0;
      done    <= 1'b0;
      for (int l = 0; l < int'(LANES); l++) pa_q[l] <= '0;
    end else begin
      done    <= 1'b0;
      wr_pend <= (st == S_LOAD);
      wr_row  <= row;
      if (wr_pend && st == S_IDLE) done <= 1'b1;   // last load row written
      unique case (st)
        S_IDLE: if (start) begin
          row    <= '0;
          base_a <= addr_a;
          base_b <= addr_b;
          base_o <= addr_o;
          unique case (op)
            OP_LOAD:  st <= S_LOAD;
            OP_SAVE:  st <= S_SAVE;
            OP_BREED: st <= S_RA;
            default:  st <= S_IDLE;
          endcase
        end
        S_LOAD: begin
          if (row == RW'(ROWS - 1)) st <= S_IDLE;
          else                      row <= row + 1'b1;
        end
        S_SAVE: begin
          if (row == RW'(ROWS - 1)) begin st <= S_IDLE; done <= 1'b1; end
          else                      row <= row + 1'b1;
        end
        S_RA: st <= S_RB;
        S_RB: begin
          st <= S_GA;
          for (int l = 0; l < int'(LANES); l++) pa_q[l] <= mem_rdata[l];
        end
        S_GA: st <= S_WO;
        S_WO: if (ga_out_valid) begin
          if (row == RW'(ROWS - 1)) begin st <= S_IDLE; done <= 1'b1; end
          else begin row <= row + 1'b1; st <= S_RA; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
