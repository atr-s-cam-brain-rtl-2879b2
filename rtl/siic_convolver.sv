// siic_convolver: Spike Interval Information Coding convolution filter.
//
// Turns a 1-bit spiketrain into an "analog" value every clock:
//   y(t) = sum_{k=0..TAPS-1} h[k] * s(t-k)
// i.e. the sum of the filter taps that line up with a 1 in the recent
// spiketrain. A TAPS-deep shift register holds the spike history; since the
// spikes are single bits the multiply is a select, so the datapath is an
// adder tree of selected taps.
// Timing: the spike presented with in_valid at clock t (s(t)) is included in
// y_out in the following clock, with y_valid high. clear empties the history
// (a multi-test signal reset); it takes effect before in_valid of the same
// clock, so y then counts only the new spike.
// The filter formula and its example follow the original CBM description; the tap count
// follows its Fig. 1 (20 samples); tap values come in through coef and the
// tap and sum widths are this design's choice.
module siic_convolver #(
  parameter int unsigned TAPS = 20,
  parameter int unsigned CW   = 8,
  parameter int unsigned OW   = CW + $clog2(TAPS) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic                  spike,
  input  logic signed [CW-1:0]  coef [TAPS],
  output logic                  y_valid,
  output logic signed [OW-1:0]  y_out
);

  logic [TAPS-1:0] hist;   // hist[k] = s(t-k) after the current spike
  logic [TAPS-1:0] nhist;

  always_comb begin
    nhist = clear ? '0 : hist;
    if (in_valid) nhist = {nhist[TAPS-2:0], spike};
  end

  logic signed [OW-1:0] sum;
  always_comb begin
    sum = '0;
    for (int k = 0; k < int'(TAPS); k++)
      if (nhist[k]) sum = sum + OW'(coef[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist    <= '0;
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      hist    <= nhist;
      y_valid <= in_valid;
      if (in_valid) y_out <= sum;
    end
  end

endmodule
