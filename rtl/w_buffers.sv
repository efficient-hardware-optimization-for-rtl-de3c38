// w_buffers: kernel side of the data cache unit.
//
// Registers holding the N x K x K kernel of the output map being computed,
// so every weight reaches its multiplier in parallel. Before each output map
// the controller copies the kernel from the weight memory, one word per
// cycle: we with idx = (n*K + ky)*K + kx. wts is a register output; it holds
// its value while the image is streamed. Keeping the kernel in K x K
// registers per channel follows the source design; the word-serial filling
// is this design's choice.
module w_buffers #(
  parameter int unsigned N      = cnn_pkg::N_DEF,
  parameter int unsigned K      = cnn_pkg::K_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF,
  localparam int unsigned IW    = $clog2(N * K * K)
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [IW-1:0]            idx,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] wts [N][K][K]
);

  always_ff @(posedge clk) begin
    if (we) begin
      for (int n = 0; n < N; n++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            if (int'(idx) == (n * K + ky) * K + kx) wts[n][ky][kx] <= din;
    end
  end

endmodule
