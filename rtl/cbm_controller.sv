// cbm_controller: sequencer of the CAM-Brain Machine (the SIMD control that
// drives every cell of the CA core in lock step).
//
// Commands (cmd_valid with cmd, one at a time, done pulses at the end):
//  CMD_EVOLVE  evaluate one individual of the population:
//              load its genotype (config_loader LOAD at geno_addr), swap it
//              into the cells, grow for grow_cycles clocks (sub-steps
//              alternate grow-dendrite / grow-axon), then signal for sig_len
//              clocks. In signalling step t the input buffer vector t drives
//              the 180 inputs, and the module outputs and target vector t
//              go to the fitness evaluator. A target vector whose clear flag
//              is set starts a new test (multi-test): that step clears the
//              CA signal state and the convolver histories. When the fitness
//              is ready, swap again and save the grown phenotype at
//              pheno_addr (config_loader SAVE).
//  CMD_BREED   make one offspring genotype: config_loader BREED from
//              parent_a and parent_b into geno_addr.
//  CMD_RUN     run a brain of n_mods modules (phenotype of module m at
//              pheno_addr + m*ROWS) for n_passes passes. Modules are
//              time-shared on the one CA: each slot swaps in the module
//              loaded during the previous slot, runs it for TRAIN clocks on
//              the signal input buffer, and meanwhile loads the next
//              module's phenotype and input trains. At the end of a slot its
//              output trains are emitted to the external interface and the
//              Signal Memory. A slot lasts TRAIN+2 clocks when the loads
//              are shorter than the run, otherwise ROWS+4 clocks (loads of
//              ROWS+2 and NIN/2+3 clocks start at the swap clock): 100 at
//              the defaults, against the original machine's 96-clock
//              interconnection length.
// From the original CBM description: the evolution-mode growth and signalling phases, the
// multi-test reset, the genetic phase, and run mode's cycling through the
// modules with reconfiguration overlapped with running. The command set and
// all timing details are this design's choice.
module cbm_controller
  import cbm_pkg::*;
#(
  parameter int unsigned NMOD  = 32768,
  parameter int unsigned ROWS  = 96,
  parameter int unsigned TRAIN = 96,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = 32,
  localparam int unsigned MW   = (NMOD > 1) ? $clog2(NMOD) : 1,
  localparam int unsigned BW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned TW   = (TRAIN > 1) ? $clog2(TRAIN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // host command
  input  logic          cmd_valid,
  input  logic [1:0]    cmd,
  input  logic [AW-1:0] geno_addr,
  input  logic [AW-1:0] pheno_addr,
  input  logic [AW-1:0] parent_a,
  input  logic [AW-1:0] parent_b,
  input  logic [15:0]   grow_cycles,
  input  logic [BW:0]   sig_len,
  input  logic [MW:0]   n_mods,
  input  logic [15:0]   n_passes,
  output logic          busy,
  output logic          done,
  // config loader
  output logic          ld_start,
  output logic [1:0]    ld_op,
  output logic [AW-1:0] ld_a,
  output logic [AW-1:0] ld_b,
  output logic [AW-1:0] ld_o,
  input  logic          ld_done,
  // CA core
  output ca_phase_e     phase,
  output logic          axon_tick,
  output logic          sig_clear,
  output logic          swap,
  output logic          in_sel,      // 0 evaluation input buffer, 1 signal input buffer
  // evaluation buffers and fitness evaluator
  output logic          eb_rd_en,
  output logic [BW-1:0] eb_rd_addr,
  input  logic          tgt_clear,   // clear flag of the target vector read last clock
  output logic          fe_start,
  output logic          fe_in_valid,
  output logic          fe_last,
  output logic          fe_test_clear,
  input  logic          fe_done,
  // run mode: input loader, signal input buffer, external interface
  output logic          il_start,
  output logic [MW-1:0] il_mod,
  input  logic          il_done,
  output logic [TW-1:0] sib_rd_t,
  output logic          cap_valid,
  output logic          emit,
  output logic [MW-1:0] emit_mod
);

  localparam logic [1:0] CMD_EVOLVE = 2'd0, CMD_BREED = 2'd1, CMD_RUN = 2'd2;
  localparam logic [1:0] OP_LOAD = 2'd0, OP_SAVE = 2'd1, OP_BREED = 2'd2;

  typedef enum logic [3:0] {
    S_IDLE, S_E_LOAD, S_E_SWAP, S_E_GROW, S_E_SIG, S_E_FIT, S_E_SWAP2,
    S_E_SAVE, S_BREED, S_R_PRE, S_R_SLOT, S_DONE
  } state_e;

  state_e        st;
  logic [15:0]   cnt;
  logic          sv, s_last;          // signalling step valid (buffer data present)
  logic [AW-1:0] geno_q, pheno_q, pb_q;
  logic [15:0]   grow_q;
  logic [BW:0]   len_q;
  logic [MW:0]   nmod_q;
  logic [31:0]   slots_left;
  logic [MW-1:0] cur, nxt;
  logic          ld_seen, il_seen;

  assign busy     = (st != S_IDLE);
  assign emit_mod = cur;
  assign il_mod   = nxt;
  assign ld_b     = pb_q;
  assign ld_o     = geno_q;

  // next module in the cycle through the brain
  logic [MW-1:0] nxt_of_nxt;
  assign nxt_of_nxt = (MW'(nxt) + 1'b1 == MW'(nmod_q)) || (nmod_q == '0) ? '0 : nxt + 1'b1;

  logic slot_run;                       // running clocks 1..TRAIN of a slot
  assign slot_run = (st == S_R_SLOT) && (cnt >= 16'd1) && (cnt <= 16'(TRAIN));

  always_comb begin
    phase         = PH_IDLE;
    axon_tick     = cnt[0];
    sig_clear     = 1'b0;
    swap          = 1'b0;
    in_sel        = 1'b0;
    eb_rd_en      = 1'b0;
    eb_rd_addr    = BW'(cnt);
    fe_in_valid   = 1'b0;
    fe_last       = 1'b0;
    fe_test_clear = 1'b0;
    cap_valid     = 1'b0;
    sib_rd_t      = TW'(cnt - 16'd1);
    unique case (st)
      S_E_SWAP, S_E_SWAP2: swap = 1'b1;
      S_E_GROW: phase = PH_GROW;
      S_E_SIG: begin
        eb_rd_en      = (cnt < 16'(len_q));
        phase         = sv ? PH_SIGNAL : PH_IDLE;
        sig_clear     = sv & tgt_clear;
        fe_in_valid   = sv;
        fe_test_clear = sv & tgt_clear;
        fe_last       = sv & s_last;
      end
      S_R_SLOT: begin
        swap      = (cnt == 16'd0);
        in_sel    = 1'b1;
        phase     = slot_run ? PH_SIGNAL : PH_IDLE;
        cap_valid = slot_run;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; sv <= 1'b0; s_last <= 1'b0;
      geno_q <= '0; pheno_q <= '0; pb_q <= '0;
      grow_q <= '0; len_q <= '0; nmod_q <= '0; slots_left <= '0;
      cur <= '0; nxt <= '0; ld_seen <= 1'b0; il_seen <= 1'b0;
      done <= 1'b0; ld_start <= 1'b0; ld_op <= OP_LOAD; ld_a <= '0;
      fe_start <= 1'b0; il_start <= 1'b0; emit <= 1'b0;
    end else begin
      done     <= 1'b0;
      ld_start <= 1'b0;
      fe_start <= 1'b0;
      il_start <= 1'b0;
      emit     <= 1'b0;
      if (ld_done) ld_seen <= 1'b1;
      if (il_done) il_seen <= 1'b1;
      unique case (st)
        S_IDLE: if (cmd_valid) begin
          geno_q <= geno_addr; pheno_q <= pheno_addr;
          pb_q <= parent_b;
          grow_q <= grow_cycles; len_q <= sig_len; nmod_q <= n_mods;
          cnt <= '0;
          unique case (cmd)
            CMD_EVOLVE: begin
              st <= S_E_LOAD; ld_start <= 1'b1; ld_op <= OP_LOAD; ld_a <= geno_addr;
            end
            CMD_BREED: begin
              st <= S_BREED; ld_start <= 1'b1; ld_op <= OP_BREED; ld_a <= parent_a;
            end
            CMD_RUN: begin
              st <= S_R_PRE;
              slots_left <= 32'(n_mods) * 32'(n_passes);
              cur <= '0; nxt <= '0;
              ld_start <= 1'b1; ld_op <= OP_LOAD; ld_a <= pheno_addr;
              il_start <= 1'b1;
              ld_seen <= 1'b0; il_seen <= 1'b0;
            end
            default: st <= S_DONE;
          endcase
        end
        // ---------------- evolution mode ----------------
        S_E_LOAD: if (ld_done) st <= S_E_SWAP;
        S_E_SWAP: begin st <= S_E_GROW; cnt <= '0; end
        S_E_GROW: begin
          if (cnt + 16'd1 >= grow_q) begin st <= S_E_SIG; cnt <= '0; fe_start <= 1'b1; end
          else cnt <= cnt + 16'd1;
        end
        S_E_SIG: begin
          sv     <= (cnt < 16'(len_q));
          s_last <= (cnt + 16'd1 == 16'(len_q));
          cnt    <= cnt + 16'd1;
          if (sv && s_last) begin st <= S_E_FIT; sv <= 1'b0; end
        end
        S_E_FIT: if (fe_done) st <= S_E_SWAP2;
        S_E_SWAP2: begin
          st <= S_E_SAVE; ld_start <= 1'b1; ld_op <= OP_SAVE; ld_a <= pheno_q;
        end
        S_E_SAVE: if (ld_done) st <= S_DONE;
        // ---------------- genetic phase ----------------
        S_BREED: if (ld_done) st <= S_DONE;
        // ---------------- run mode ----------------
        S_R_PRE: if ((ld_seen || ld_done) && (il_seen || il_done)) begin
          st <= S_R_SLOT; cnt <= '0;
        end
        S_R_SLOT: begin
          if (cnt == 16'd0) begin
            // swap clock: module nxt becomes current, start loading the next one
            cur <= nxt;
            ld_seen <= 1'b0; il_seen <= 1'b0;
            if (slots_left > 32'd1) begin
              nxt <= nxt_of_nxt;
              ld_start <= 1'b1; ld_op <= OP_LOAD;
              ld_a <= pheno_q + AW'(nxt_of_nxt) * AW'(ROWS);
              il_start <= 1'b1;
            end else begin
              ld_seen <= 1'b1; il_seen <= 1'b1;
            end
            cnt <= cnt + 16'd1;
          end else if (cnt <= 16'(TRAIN)) begin
            cnt <= cnt + 16'd1;
          end else if ((ld_seen || ld_done) && (il_seen || il_done) && !emit) begin
            emit <= 1'b1;
            slots_left <= slots_left - 32'd1;
            if (slots_left == 32'd1) st <= S_DONE;
            else cnt <= '0;
          end
        end
        S_DONE: begin st <= S_IDLE; done <= 1'b1; end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
