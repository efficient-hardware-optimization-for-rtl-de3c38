// window_buffer: K x K register window over one input channel.
//
// Each 'shift' moves every row of the window one place to the left and loads
// the new column (from the line buffer) into the right-hand column, so after
// the pixel at (y, x) has been shifted in, win[ky][kx] holds the pixel at
// (y-K+1+ky, x-K+1+kx). Only one new column is fetched per pixel; the other
// K-1 columns are reused, which is the purpose of the window buffer in the
// source design. win is a register output, updated on the edge where shift
// is high. No reset (the data are qualified by the caller).
module window_buffer #(
  parameter int unsigned K      = cnn_pkg::K_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     shift,
  input  logic signed [DATA_W-1:0] col_in [K],
  output logic signed [DATA_W-1:0] win    [K][K]
);

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= col_in[r];
      end
    end
  end

endmodule
