// weight_bram: kernel weight and bias memory of the input layer.
//
// Holds the M x N x K x K kernel weights and the M biases, one word per
// entry, each memory with one write port and one registered read port. The
// weights of the output map being computed are copied from here into the
// kernel registers (w_buffers) one word per cycle, so a single read port is
// enough. Storing weights and biases in block RAM follows the source design;
// the port structure and the address order are this design's choices.
//
// Weight address: ((m*N + n)*K + ky)*K + kx.  Bias address: m.
// Both read ports have one cycle of latency.
module weight_bram #(
  parameter int unsigned N      = cnn_pkg::N_DEF,
  parameter int unsigned M      = cnn_pkg::M_DEF,
  parameter int unsigned K      = cnn_pkg::K_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF,
  localparam int unsigned WDEPTH = M * N * K * K,
  localparam int unsigned WAW    = $clog2(WDEPTH),
  localparam int unsigned BAW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic                     clk,
  input  logic                     w_wr_en,
  input  logic [WAW-1:0]           w_wr_addr,
  input  logic signed [DATA_W-1:0] w_wr_data,
  input  logic                     b_wr_en,
  input  logic [BAW-1:0]           b_wr_addr,
  input  logic signed [DATA_W-1:0] b_wr_data,
  input  logic [WAW-1:0]           w_rd_addr,
  output logic signed [DATA_W-1:0] w_rd_data,
  input  logic [BAW-1:0]           b_rd_addr,
  output logic signed [DATA_W-1:0] b_rd_data
);

  logic signed [DATA_W-1:0] wmem [WDEPTH];
  logic signed [DATA_W-1:0] bmem [M];

  always_ff @(posedge clk) begin
    if (w_wr_en) wmem[w_wr_addr] <= w_wr_data;
    w_rd_data <= wmem[w_rd_addr];
  end

  always_ff @(posedge clk) begin
    if (b_wr_en) bmem[b_wr_addr] <= b_wr_data;
    b_rd_data <= bmem[b_rd_addr];
  end

endmodule
