// tb_ca_module: self-checking test of the toroidal CA cube on a 4x4x3 cube.
// 1. Row writes and shadow read-back, and the swap exchange.
// 2. Directed growth: one neuron in a cube of growth-blocking blanks grows
//    exactly its six neighbours (five dendrites pointing at it, one axon).
// 3. Random genotypes grown and then signalled with random surface inputs;
//    the grown phenotype (read back after a second swap) and the four output
//    points are compared every clock with a reference CoDi model of the whole
//    cube written in this testbench, including wrap-around links and input
//    injection on both opposite surfaces.
module tb_ca_module;
  import cbm_pkg::*;

  localparam int X = 4, Y = 4, Z = 3, LANES = 16, NIN = 12, NOUT = 4, THRESH = 2;
  localparam int N = X * Y * Z, ROWS = N / LANES, NPF = NIN / 3;

  logic clk = 0, rst_n = 0;
  ca_phase_e phase = PH_IDLE;
  logic axon_tick = 0, sig_clear = 0, swap = 0, cfg_we = 0;
  logic [$clog2(ROWS)-1:0] cfg_row = '0, rd_row = '0;
  cell_cfg_t cfg_wdata [LANES];
  cell_cfg_t rd_data [LANES];
  logic [NIN-1:0] ext_in = '0;
  logic [NOUT-1:0] out_pts;
  int checks = 0, failures = 0;

  ca_module #(.X(X), .Y(Y), .Z(Z), .LANES(LANES), .NIN(NIN), .NOUT(NOUT), .THRESH(THRESH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- reference model ----------------
  int typ [N], dr [N], chr [N], sg [N], pd [N], ac [N];

  function automatic int cid(int x, int y, int z);
    return ((x + X) % X) + X * (((y + Y) % Y) + Y * ((z + Z) % Z));
  endfunction
  function automatic int nb(int i, int f);
    int x, y, z;
    x = i % X; y = (i / X) % Y; z = i / (X * Y);
    case (f)
      0: return cid(x + 1, y, z);
      1: return cid(x - 1, y, z);
      2: return cid(x, y + 1, z);
      3: return cid(x, y - 1, z);
      4: return cid(x, y, z + 1);
      default: return cid(x, y, z - 1);
    endcase
  endfunction
  // what cell i sends on face f
  function automatic bit rout(int i, int f, bit grow, bit at);
    if (grow) begin
      if (typ[i] == CT_NEURON) return at ? (f == dr[i]) : (f != dr[i]);
      if (typ[i] == CT_DENDRITE) return !at && pd[i] != 0 && f != dr[i] && chr[i][f];
      if (typ[i] == CT_AXON) return at && pd[i] != 0 && f != dr[i] && chr[i][f];
      return 0;
    end
    if (sg[i] == 0) return 0;
    if (typ[i] == CT_NEURON || typ[i] == CT_DENDRITE) return f == dr[i];
    if (typ[i] == CT_AXON) return f != dr[i];
    return 0;
  endfunction
  // surface injection: input j of face pair p at position floor(j*A*B/NPF)
  function automatic bit rinj(int i, int f, logic [NIN-1:0] ev);
    int x, y, z, p, a, b, pos;
    x = i % X; y = (i / X) % Y; z = i / (X * Y);
    p = f / 2;
    if (p == 0) begin if (!((f == 0 && x == X - 1) || (f == 1 && x == 0))) return 0; pos = y + Y * z; a = Y * Z; end
    else if (p == 1) begin if (!((f == 2 && y == Y - 1) || (f == 3 && y == 0))) return 0; pos = x + X * z; a = X * Z; end
    else begin if (!((f == 4 && z == Z - 1) || (f == 5 && z == 0))) return 0; pos = x + X * y; a = X * Y; end
    for (int j = 0; j < NPF; j++) if ((j * a) / NPF == pos && ev[p * NPF + j]) return 1;
    return 0;
  endfunction
  task automatic rstep(bit grow, bit at, logic [NIN-1:0] ev);
    int ntyp [N], ndr [N], nsg [N], npd [N], nac [N];
    for (int i = 0; i < N; i++) begin
      logic [5:0] inb;
      for (int f = 0; f < 6; f++)
        inb[f] = rout(nb(i, f), f ^ 1, grow, at) | (!grow && rinj(i, f, ev));
      ntyp[i] = typ[i]; ndr[i] = dr[i]; nsg[i] = sg[i]; npd[i] = pd[i]; nac[i] = ac[i];
      if (grow) begin
        if (typ[i] == CT_BLANK && inb != 0) begin
          int f0;
          f0 = 0;
          while (!inb[f0]) f0++;
          ntyp[i] = at ? CT_AXON : CT_DENDRITE; ndr[i] = f0; npd[i] = 1;
        end else if ((typ[i] == CT_DENDRITE && !at) || (typ[i] == CT_AXON && at))
          npd[i] = inb[dr[i]];
      end else begin
        if (typ[i] == CT_DENDRITE) begin
          int x; x = 0;
          for (int f = 0; f < 6; f++) if (f != dr[i]) x ^= int'(inb[f]);
          nsg[i] = x;
        end else if (typ[i] == CT_AXON) nsg[i] = inb[dr[i]];
        else if (typ[i] == CT_NEURON) begin
          int s; s = ac[i];
          for (int f = 0; f < 6; f++) if (f != dr[i] && inb[f]) s += chr[i][f] ? 1 : -1;
          s = s < 0 ? 0 : s > 15 ? 15 : s;
          if (s > THRESH) begin nsg[i] = 1; nac[i] = 0; end
          else begin nsg[i] = 0; nac[i] = s; end
        end
      end
    end
    typ = ntyp; dr = ndr; sg = nsg; pd = npd; ac = nac;
  endtask

  // ---------------- DUT helpers ----------------
  task automatic load_and_swap(input cell_cfg_t img [N]);
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      cfg_we = 1; cfg_row = r[$clog2(ROWS)-1:0];
      for (int s = 0; s < LANES; s++) cfg_wdata[s] = img[r * LANES + s];
    end
    @(negedge clk); cfg_we = 0;
    for (int r = 0; r < ROWS; r++) begin
      rd_row = r[$clog2(ROWS)-1:0]; #1;
      for (int s = 0; s < LANES; s++) check(rd_data[s] == img[r * LANES + s], "shadow read-back");
    end
    swap = 1; @(negedge clk); swap = 0;
    for (int i = 0; i < N; i++) begin
      typ[i] = img[i].ctype; dr[i] = img[i].dir; chr[i] = img[i].chrom;
      sg[i] = 0; pd[i] = 0; ac[i] = 0;
    end
  endtask

  task automatic compare_phenotype(input string tag);
    swap = 1; @(negedge clk); swap = 0;   // grown phenotype to the shadow
    for (int r = 0; r < ROWS; r++) begin
      rd_row = r[$clog2(ROWS)-1:0]; #1;
      for (int s = 0; s < LANES; s++) begin
        int i; i = r * LANES + s;
        check(rd_data[s].ctype == cell_type_e'(typ[i]) &&
              (typ[i] == CT_BLANK || int'(rd_data[s].dir) == dr[i]),
              $sformatf("%s phenotype cell %0d", tag, i));
      end
    end
    swap = 1; @(negedge clk); swap = 0;   // back into the cells, signal state cleared
    for (int i = 0; i < N; i++) begin sg[i] = 0; pd[i] = 0; ac[i] = 0; end
  endtask

  function automatic int opt(int o);
    case (o)
      0: return cid(0, Y / 2, Z / 2);
      1: return cid(X / 2, 0, Z / 2);
      2: return cid(X / 2, Y / 2, 0);
      default: return 0;
    endcase
  endfunction

  cell_cfg_t img [N];
  int grown_cells;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- directed growth ----
    for (int i = 0; i < N; i++) img[i] = '{ctype: CT_BLANK, dir: 3'd0, chrom: 6'd0};
    img[cid(1, 1, 1)] = '{ctype: CT_NEURON, dir: 3'd0, chrom: 6'b111111};
    load_and_swap(img);
    phase = PH_GROW;
    for (int c = 0; c < 6; c++) begin
      axon_tick = c[0]; rstep(1, c[0], '0); @(negedge clk);
    end
    phase = PH_IDLE;
    check(typ[cid(2, 1, 1)] == CT_AXON && dr[cid(2, 1, 1)] == 1, "reference: axon on +x");
    check(typ[cid(1, 1, 0)] == CT_DENDRITE && dr[cid(1, 1, 0)] == 4, "reference: dendrite below");
    grown_cells = 0;
    for (int i = 0; i < N; i++) if (typ[i] != CT_BLANK) grown_cells++;
    check(grown_cells == 7, "neuron plus six grown neighbours");
    compare_phenotype("directed");

    // ---- random genotypes, growth then signalling ----
    for (int trial = 0; trial < 6; trial++) begin
      for (int i = 0; i < N; i++) img[i] = '{ctype: CT_BLANK, dir: 3'd0, chrom: 6'($urandom)};
      for (int k = 0; k < 3; k++)
        img[$urandom_range(0, N - 1)] = '{ctype: CT_NEURON, dir: 3'($urandom_range(0, 5)), chrom: 6'($urandom)};
      load_and_swap(img);
      phase = PH_GROW;
      for (int c = 0; c < 10; c++) begin
        axon_tick = c[0]; rstep(1, c[0], '0); @(negedge clk);
      end
      phase = PH_IDLE;
      compare_phenotype($sformatf("trial %0d", trial));
      phase = PH_SIGNAL;
      for (int c = 0; c < 60; c++) begin
        ext_in = NIN'({$urandom, $urandom});
        if (c == 30) sig_clear = 1;
        #1;
        for (int o = 0; o < NOUT; o++)
          check(out_pts[o] == sg[opt(o)][0], $sformatf("trial %0d cycle %0d out %0d", trial, c, o));
        if (sig_clear) begin
          for (int i = 0; i < N; i++) begin sg[i] = 0; pd[i] = 0; ac[i] = 0; end
        end else rstep(0, 0, ext_in);
        @(negedge clk);
        sig_clear = 0;
      end
      phase = PH_IDLE; ext_in = '0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
