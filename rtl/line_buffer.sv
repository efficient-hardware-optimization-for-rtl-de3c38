// line_buffer: row cache of one input channel, built from shift registers.
//
// Pixels of one channel arrive in raster order, one per 'shift'. The buffer
// is a chain of K-1 shift registers, each W words long, so the tail of the
// j-th register holds the pixel exactly j+1 rows above the incoming one. The
// K taps therefore present one column of K vertically adjacent pixels:
// taps[K-1] is the incoming pixel (bottom row) and taps[0] the pixel K-1 rows
// above it (top row). The window buffer takes this column every cycle.
// Building the line buffer as shift-register logic follows the source design;
// taking the current row straight from the input, so that only K-1 rows are
// stored, is this design's choice.
//
// Timing: taps are combinational from din and the register tails; the
// registers advance on the clock edge where shift is high. No reset: the
// window logic downstream ignores columns until K-1 full rows have passed.
module line_buffer #(
  parameter int unsigned K      = cnn_pkg::K_DEF,
  parameter int unsigned W      = cnn_pkg::W_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     shift,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] taps [K]
);

  logic signed [DATA_W-1:0] sr [K-1][W];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int j = 0; j < K - 1; j++) begin
        sr[j][0] <= (j == 0) ? din : sr[j-1][W-1];
        for (int i = 1; i < W; i++) sr[j][i] <= sr[j][i-1];
      end
    end
  end

  always_comb begin
    taps[K-1] = din;
    for (int j = 0; j < K - 1; j++) taps[K-2-j] = sr[j][W-1];
  end

endmodule
