// tb_codi_cell: self-checking test of one CoDi cell.
// Directed growth checks (neuron growth signals, blank-to-dendrite and
// blank-to-axon conversion, delayed forwarding along the chromosome mask,
// swap exchange) and randomised signalling checks of neuron, dendrite and
// axon cells against an integer reference model kept in this testbench.
module tb_codi_cell;
  import cbm_pkg::*;

  localparam int THRESH = 2;
  logic clk = 0, rst_n = 0;
  ca_phase_e phase = PH_IDLE;
  logic axon_tick = 0, sig_clear = 0, swap = 0, cfg_we = 0;
  cell_cfg_t cfg_wdata = '0, cfg_shadow, cfg_active;
  logic [5:0] in_bits = '0, out_bits;
  logic state;
  int checks = 0, failures = 0;

  codi_cell #(.THRESH(THRESH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic configure(input cell_type_e t, input int d, input logic [5:0] m);
    @(negedge clk);
    cfg_we = 1; cfg_wdata = '{ctype: t, dir: 3'(d), chrom: m};
    @(negedge clk);
    cfg_we = 0; swap = 1;
    @(negedge clk);
    swap = 0;
  endtask

  // reference model state for signalling
  int r_acc; bit r_sig;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- neuron growth signals ----
    configure(CT_NEURON, 2, 6'b010101);
    check(cfg_active.ctype == CT_NEURON && cfg_active.dir == 3'd2, "neuron configured");
    check(cfg_shadow == '0, "swap moved old active (blank) to shadow");
    phase = PH_GROW; axon_tick = 0; #1;
    check(out_bits == 6'b111011, "neuron dendrite growth on five faces");
    axon_tick = 1; #1;
    check(out_bits == 6'b000100, "neuron axon growth on axon face");

    // ---- blank becomes dendrite and forwards on mask faces two ticks later ----
    configure(CT_BLANK, 0, 6'b110011);
    phase = PH_GROW; axon_tick = 0; in_bits = 6'b001100;
    @(negedge clk);
    in_bits = '0;
    check(cfg_active.ctype == CT_DENDRITE && cfg_active.dir == 3'd2, "blank -> dendrite, dir = lowest face");
    axon_tick = 1; #1;
    check(out_bits == 6'b0, "dendrite silent on axon tick");
    @(negedge clk);
    axon_tick = 0; #1;
    check(out_bits == 6'b110011, "dendrite forwards on mask faces");
    @(negedge clk);                 // no new growth signal on dir: disarmed
    axon_tick = 1; @(negedge clk); axon_tick = 0; #1;
    check(out_bits == 6'b0, "dendrite disarmed without new growth signal");

    // ---- blank becomes axon on an axon tick ----
    configure(CT_BLANK, 0, 6'b111111);
    phase = PH_GROW; axon_tick = 1; in_bits = 6'b100000;
    @(negedge clk);
    in_bits = '0;
    check(cfg_active.ctype == CT_AXON && cfg_active.dir == 3'd5, "blank -> axon, dir = 5");
    axon_tick = 0; #1;
    check(out_bits == 6'b0, "axon silent on dendrite tick");
    @(negedge clk); axon_tick = 1; #1;
    check(out_bits == 6'b011111, "axon forwards on mask faces except its input");
    phase = PH_IDLE;

    // ---- signalling: neuron with reference model ----
    for (int t = 0; t < 3; t++) begin
      cell_type_e ty;
      int d;
      logic [5:0] m;
      ty = (t == 0) ? CT_NEURON : (t == 1) ? CT_DENDRITE : CT_AXON;
      d  = $urandom_range(0, 5);
      m  = 6'($urandom);
      configure(ty, d, m);
      phase = PH_SIGNAL;
      r_acc = 0; r_sig = 0;
      for (int c = 0; c < 400; c++) begin
        int s, nexc, ninh, x;
        logic [5:0] exp_out;
        in_bits = 6'($urandom);
        if (c % 97 == 50) sig_clear = 1;
        #1;
        exp_out = '0;
        if (r_sig) begin
          if (ty == CT_AXON) exp_out = ~(6'b1 << d);
          else               exp_out = 6'b1 << d;
        end
        check(out_bits == exp_out && state == r_sig, $sformatf("signal out type %0d cycle %0d", ty, c));
        // reference next state
        if (sig_clear) begin
          r_sig = 0; r_acc = 0;
        end else if (ty == CT_NEURON) begin
          nexc = 0; ninh = 0;
          for (int f = 0; f < 6; f++) if (f != d && in_bits[f]) begin
            if (m[f]) nexc++; else ninh++;
          end
          s = r_acc + nexc - ninh;
          s = (s < 0) ? 0 : (s > 15) ? 15 : s;
          if (s > THRESH) begin r_sig = 1; r_acc = 0; end
          else begin r_sig = 0; r_acc = s; end
        end else if (ty == CT_DENDRITE) begin
          x = 0;
          for (int f = 0; f < 6; f++) if (f != d) x ^= int'(in_bits[f]);
          r_sig = x[0];
        end else begin
          r_sig = in_bits[d];
        end
        @(negedge clk);
        sig_clear = 0;
      end
      phase = PH_IDLE;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
