// signal_memory: stores the output spiketrains of every module of a brain.
//
// NMOD modules x NSIG trains of TRAIN bits (bit t = output at run clock t).
// One write port, used by the external interface to save the trains of the
// module that just ran, and two read ports, used by the input buffer loader
// to fetch two source trains per clock. Reads return data one clock later.
// From the original CBM description: 32,768 modules, up to three 96-bit output spiketrains
// each, 96-clock interconnection length. The port count is this design's
// choice (it lets 180 trains be read within one module slot).
module signal_memory #(
  parameter int unsigned NMOD  = 32768,
  parameter int unsigned NSIG  = 3,
  parameter int unsigned TRAIN = 96,
  localparam int unsigned MW   = (NMOD > 1) ? $clog2(NMOD) : 1,
  localparam int unsigned SW   = (NSIG > 1) ? $clog2(NSIG) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [MW-1:0]    wr_mod,
  input  logic [SW-1:0]    wr_sig,
  input  logic [TRAIN-1:0] wr_data,
  input  logic [1:0]       rd_en,
  input  logic [MW-1:0]    rd_mod  [2],
  input  logic [SW-1:0]    rd_sig  [2],
  output logic [TRAIN-1:0] rd_data [2]
);

  logic [TRAIN-1:0] mem [NMOD * NSIG];

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_mod) * NSIG + int'(wr_sig)] <= wr_data;
    for (int p = 0; p < 2; p++)
      if (rd_en[p]) rd_data[p] <= mem[int'(rd_mod[p]) * NSIG + int'(rd_sig[p])];
  end

endmodule
