// signal_input_buffer: double-buffered input spiketrains of a module slot.
//
// Two banks of NIN trains x TRAIN bits. The front bank feeds the running
// module: vec[i] = bit rd_t of train i, combinationally. The back bank is
// filled for the next module through two write ports (one train each per
// clock). swap exchanges the banks in one clock, so the next module's inputs
// are ready the moment it is instantiated.
// From the original CBM description: an input buffer loaded with up to 180 spiketrains per
// module while the module before it runs. Double buffering and two write
// ports are this design's choice, made to keep the CA running without gaps.
module signal_input_buffer #(
  parameter int unsigned NIN   = 180,
  parameter int unsigned TRAIN = 96,
  localparam int unsigned IW   = (NIN > 1) ? $clog2(NIN) : 1,
  localparam int unsigned TW   = (TRAIN > 1) ? $clog2(TRAIN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             swap,
  input  logic [1:0]       wr_en,
  input  logic [IW-1:0]    wr_idx  [2],
  input  logic [TRAIN-1:0] wr_data [2],
  input  logic [TW-1:0]    rd_t,
  output logic [NIN-1:0]   vec
);

  logic [TRAIN-1:0] bank [2][NIN];
  logic             front;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      front <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < int'(NIN); i++) bank[b][i] <= '0;
    end else begin
      if (swap) front <= ~front;
      for (int p = 0; p < 2; p++)
        if (wr_en[p]) bank[~front][wr_idx[p]] <= wr_data[p];
    end
  end

  always_comb
    for (int i = 0; i < int'(NIN); i++) vec[i] = bank[front][i][rd_t];

endmodule
