// fitness_evaluator: hardware fitness measure of an evolving module.
//
// For each of NCH module outputs, the output spiketrain and the target
// spiketrain are each run through a SIIC convolver (shared tap registers);
// every clock the absolute differences of the two filtered waveforms are
// added to a fitness accumulator. The result is the sum of absolute
// deviations over the whole signalling phase (lower is better). In a
// multi-test run, test_clear empties all convolver histories at a test
// boundary, so each test is scored from a clean start; the partial scores
// simply add up in the accumulator.
// Interface: coef gives the filter taps (held in registers outside). start
// zeroes the accumulator and empties the convolver histories. Each in_valid clock supplies out_spk and tgt_spk. The
// deviation of that clock is added two clocks later; fitness is valid
// (done = 1) two clocks after the clock with last = 1, and holds until the
// next start.
// From the original CBM description: convolution of outputs with the filter, comparison
// with a target array of spiketrains, sum of absolute deviations, multi-test
// resets and summed partial fitness, up to three outputs. This design's
// choice: the target is convolved with the same filter, widths, latency.
module fitness_evaluator #(
  parameter int unsigned NCH  = 3,
  parameter int unsigned TAPS = 20,
  parameter int unsigned CW   = 8,
  parameter int unsigned FW   = 32,
  localparam int unsigned OW  = CW + $clog2(TAPS) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [CW-1:0]  coef [TAPS],
  input  logic                  start,
  input  logic                  test_clear,
  input  logic                  in_valid,
  input  logic                  last,
  input  logic [NCH-1:0]        out_spk,
  input  logic [NCH-1:0]        tgt_spk,
  output logic [FW-1:0]         fitness,
  output logic                  done
);

  logic signed [OW-1:0] yo [NCH];
  logic signed [OW-1:0] yt [NCH];
  logic [NCH-1:0]       vo, vt;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    siic_convolver #(.TAPS(TAPS), .CW(CW), .OW(OW)) u_out (
      .clk, .rst_n, .clear(test_clear | start), .in_valid, .spike(out_spk[c]),
      .coef, .y_valid(vo[c]), .y_out(yo[c]));
    siic_convolver #(.TAPS(TAPS), .CW(CW), .OW(OW)) u_tgt (
      .clk, .rst_n, .clear(test_clear | start), .in_valid, .spike(tgt_spk[c]),
      .coef, .y_valid(vt[c]), .y_out(yt[c]));
  end

  logic [FW-1:0] dev;
  always_comb begin
    dev = '0;
    for (int c = 0; c < int'(NCH); c++) begin
      logic signed [OW:0] d;
      d = {yo[c][OW-1], yo[c]} - {yt[c][OW-1], yt[c]};
      if (d < 0) d = -d;
      dev = dev + FW'(unsigned'(d));
    end
  end

  logic last_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fitness <= '0;
      done    <= 1'b0;
      last_d  <= 1'b0;
    end else begin
      last_d  <= in_valid & last;
      if (start) begin
        fitness <= '0;
        done    <= 1'b0;
      end else begin
        if (vo[0]) fitness <= fitness + dev;
        if (last_d) done <= 1'b1;
      end
    end
  end

  logic unused_v;
  assign unused_v = ^{vo[NCH-1:0], vt};

endmodule
