// spiketrain_buffer: a clocked spiketrain vector store for fitness evaluation.
//
// Holds DEPTH vectors of W bits, one vector per signalling clock. The host
// writes vectors through wr_en/wr_addr/wr_data before a run; during the
// signalling phase the sequencer reads one vector per clock (rd_en/rd_addr),
// and rd_data shows it one clock later (synchronous read, as a block RAM).
// The CBM uses two of them: the input spiketrain buffer (W = 180, one bit
// per module input) and the target spiketrain buffer (target bits of the
// three outputs plus a test-boundary flag). Both buffers and the one-vector-
// per-clock reading follow the original CBM description; DEPTH (1024, enough for the
// "up to 1000 update cycles" of an evaluation) and the read latency are this
// design's choice.
module spiketrain_buffer #(
  parameter int unsigned W     = 180,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
