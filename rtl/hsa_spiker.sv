// hsa_spiker: Hough Spiker Algorithm, analog sample stream to spiketrain.
//
// The inverse of the SIIC convolution. A window r[0..TAPS-1] of residual
// signal values is kept, r[0] being the oldest. Each new sample shifts in at
// r[TAPS-1]; then, if every filter tap is no larger than the residual it
// lines up with (h[k] <= r[k] for all k), the spike for the oldest position
// is 1 and the taps are subtracted from the window; otherwise the spike is 0.
// Interface: one signed sample per in_valid clock. The spike for sample
// time t is decided when sample t+TAPS-1 arrives and appears on spike with
// spike_valid one clock later; the first TAPS-1 samples give no spike.
// clear empties the window.
// The algorithm follows the original CBM description: its worked example (the filter
// 1 4 9 5 -2 on the signal 1 5 13 15 7 7 6 2 9 5 -2) spikes where every
// tap is below or equal to the signal, so "less or equal" is used. The
// streaming window form and the widths are this design's choice.
module hsa_spiker #(
  parameter int unsigned TAPS = 20,
  parameter int unsigned CW   = 8,
  parameter int unsigned SW   = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic signed [CW-1:0] coef [TAPS],
  input  logic                 in_valid,
  input  logic signed [SW-1:0] sample,
  output logic                 spike_valid,
  output logic                 spike
);

  localparam int unsigned CNTW = $clog2(TAPS + 1);

  logic signed [SW-1:0] r   [TAPS];
  logic signed [SW-1:0] w   [TAPS];
  logic signed [SW-1:0] wn  [TAPS];
  logic [CNTW-1:0]      fill;
  logic                 hit;

  always_comb begin
    for (int k = 0; k < int'(TAPS) - 1; k++) w[k] = r[k + 1];
    w[TAPS-1] = sample;
    hit = 1'b1;
    for (int k = 0; k < int'(TAPS); k++)
      if (SW'(coef[k]) > w[k]) hit = 1'b0;
    for (int k = 0; k < int'(TAPS); k++)
      wn[k] = hit ? (w[k] - SW'(coef[k])) : w[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++) r[k] <= '0;
      fill        <= '0;
      spike       <= 1'b0;
      spike_valid <= 1'b0;
    end else if (clear) begin
      for (int k = 0; k < int'(TAPS); k++) r[k] <= '0;
      fill        <= '0;
      spike       <= 1'b0;
      spike_valid <= 1'b0;
    end else begin
      spike_valid <= 1'b0;
      if (in_valid) begin
        if (fill < CNTW'(TAPS - 1)) begin
          for (int k = 0; k < int'(TAPS); k++) r[k] <= w[k];
          fill <= fill + 1'b1;
        end else begin
          for (int k = 0; k < int'(TAPS); k++) r[k] <= wn[k];
          spike       <= hit;
          spike_valid <= 1'b1;
        end
      end
    end
  end

endmodule
