// ca_module: the Cellular Automata Module, a toroidal 3D cube of CoDi cells.
//
// X*Y*Z codi_cell instances are linked to their six face neighbours; the
// top layer wraps to the bottom, north to south and east to west, so the
// cube is a fully recurrent torus. All cells update together on every clock.
//
// Inputs from other modules: NIN/3 input points on each of the three surface
// pairs (x, y, z). Input j of a surface pair sits at linear surface position
// floor(j*A*B/(NIN/3)) (A*B = cells on that surface) and enters on the
// wrap-around link, i.e. it is ORed into the outer-face input of the cell on
// both opposite surfaces. External inputs act only in the signalling phase.
// Outputs: out_pts[0..2] are the cells at the centre of the x, y and z
// surfaces, out_pts[3] the corner cell (0,0,0); each is that cell's signal.
//
// Configuration port: cells are numbered idx = x + X*(y + Y*z) and grouped
// into rows of LANES cells (row = idx / LANES). cfg_we writes one whole row of
// shadow registers per clock; rd_row reads a row of shadow registers
// (combinational), which after swap holds the grown phenotype. swap exchanges
// shadow and active configuration of every cell in one clock.
//
// From the original CBM description: 24x24x24 cells, toroidal wrap, 60 inputs per surface
// (180 in all), four output points (one per surface and one corner), dual
// configuration register. This design's choices: the exact input and output
// positions, the OR injection on the wrap link, and the row-wide
// configuration port (144 cells per row = 2 cells per clock for each of the
// 72 FPGAs, so a module loads in 96 clocks).
module ca_module
  import cbm_pkg::*;
#(
  parameter int unsigned X      = 24,
  parameter int unsigned Y      = 24,
  parameter int unsigned Z      = 24,
  parameter int unsigned LANES  = 144,
  parameter int unsigned NIN    = 180,
  parameter int unsigned NOUT   = 4,
  parameter int unsigned THRESH = 2,
  localparam int unsigned NCELL = X * Y * Z,
  localparam int unsigned ROWS  = NCELL / LANES,
  localparam int unsigned RW    = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ca_phase_e             phase,
  input  logic                  axon_tick,
  input  logic                  sig_clear,
  input  logic                  swap,
  input  logic                  cfg_we,
  input  logic [RW-1:0]         cfg_row,
  input  cell_cfg_t             cfg_wdata [LANES],
  input  logic [RW-1:0]         rd_row,
  output cell_cfg_t             rd_data   [LANES],
  input  logic [NIN-1:0]        ext_in,
  output logic [NOUT-1:0]       out_pts
);

  localparam int unsigned NPF = NIN / 3;   // inputs per surface pair

  // Input index j (or -1) at linear position p of a surface with n cells.
  function automatic int in_at(input int p, input int n);
    int j;
    j = (p * int'(NPF) + n - 1) / n;        // ceil(p*NPF/n)
    if (j < int'(NPF) && (j * n) / int'(NPF) == p) return j;
    return -1;
  endfunction

  logic [5:0]  ob    [NCELL];
  logic        st    [NCELL];
  cell_cfg_t   shd   [NCELL];
  logic        inj   [NCELL][6];
  logic        sig_ph;
  assign sig_ph = (phase == PH_SIGNAL);

  for (genvar z = 0; z < Z; z++) begin : g_z
    for (genvar y = 0; y < Y; y++) begin : g_y
      for (genvar x = 0; x < X; x++) begin : g_x
        localparam int I   = x + X * (y + Y * z);
        localparam int IXP = ((x + 1) % X)     + X * (y + Y * z);
        localparam int IXM = ((x + X - 1) % X) + X * (y + Y * z);
        localparam int IYP = x + X * (((y + 1) % Y)     + Y * z);
        localparam int IYM = x + X * (((y + Y - 1) % Y) + Y * z);
        localparam int IZP = x + X * (y + Y * ((z + 1) % Z));
        localparam int IZM = x + X * (y + Y * ((z + Z - 1) % Z));
        localparam int JX  = in_at(y + Y * z, Y * Z);
        localparam int JY  = in_at(x + X * z, X * Z);
        localparam int JZ  = in_at(x + X * y, X * Y);

        // injected external bits on the outer faces
        if (x == X - 1 && JX >= 0) begin : g_ie
          assign inj[I][0] = sig_ph & ext_in[JX];
        end else begin : g_ne
          assign inj[I][0] = 1'b0;
        end
        if (x == 0 && JX >= 0) begin : g_iw
          assign inj[I][1] = sig_ph & ext_in[JX];
        end else begin : g_nw
          assign inj[I][1] = 1'b0;
        end
        if (y == Y - 1 && JY >= 0) begin : g_in
          assign inj[I][2] = sig_ph & ext_in[NPF + JY];
        end else begin : g_nn
          assign inj[I][2] = 1'b0;
        end
        if (y == 0 && JY >= 0) begin : g_is
          assign inj[I][3] = sig_ph & ext_in[NPF + JY];
        end else begin : g_ns
          assign inj[I][3] = 1'b0;
        end
        if (z == Z - 1 && JZ >= 0) begin : g_it
          assign inj[I][4] = sig_ph & ext_in[2 * NPF + JZ];
        end else begin : g_nt
          assign inj[I][4] = 1'b0;
        end
        if (z == 0 && JZ >= 0) begin : g_ib
          assign inj[I][5] = sig_ph & ext_in[2 * NPF + JZ];
        end else begin : g_nb
          assign inj[I][5] = 1'b0;
        end

        logic [5:0] in_b;
        assign in_b[0] = ob[IXP][1] | inj[I][0];
        assign in_b[1] = ob[IXM][0] | inj[I][1];
        assign in_b[2] = ob[IYP][3] | inj[I][2];
        assign in_b[3] = ob[IYM][2] | inj[I][3];
        assign in_b[4] = ob[IZP][5] | inj[I][4];
        assign in_b[5] = ob[IZM][4] | inj[I][5];

        cell_cfg_t act_unused;
        codi_cell #(.THRESH(THRESH)) u_cell (
          .clk        (clk),
          .rst_n      (rst_n),
          .phase      (phase),
          .axon_tick  (axon_tick),
          .sig_clear  (sig_clear),
          .swap       (swap),
          .cfg_we     (cfg_we && (cfg_row == RW'(I / LANES))),
          .cfg_wdata  (cfg_wdata[I % LANES]),
          .cfg_shadow (shd[I]),
          .cfg_active (act_unused),
          .in_bits    (in_b),
          .out_bits   (ob[I]),
          .state      (st[I])
        );
      end
    end
  end

  for (genvar s = 0; s < LANES; s++) begin : g_rd
    assign rd_data[s] = shd[int'(rd_row) * LANES + s];
  end

  // output points: centres of the x, y, z surfaces and the corner cell
  localparam int O0 = 0     + X * ((Y / 2) + Y * (Z / 2));
  localparam int O1 = X / 2 + X * (0       + Y * (Z / 2));
  localparam int O2 = X / 2 + X * ((Y / 2) + Y * 0);
  localparam int O3 = 0;
  localparam int OPT [4] = '{O0, O1, O2, O3};
  for (genvar o = 0; o < NOUT; o++) begin : g_out
    assign out_pts[o] = st[OPT[o % 4]];
  end

endmodule
