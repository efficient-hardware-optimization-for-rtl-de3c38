// ofm_bram: output feature map memory.
//
// Holds M output maps of R x C words at the full accumulator width (the
// design does not requantise its results). The activation stage writes one
// word per cycle; the host reads results through a registered read port.
// Storing the output maps in block RAM follows the source design; the word
// width and address order are this design's choices.
//
// Address: m*R*C + y*C + x. Read latency one cycle.
module ofm_bram #(
  parameter int unsigned M     = cnn_pkg::M_DEF,
  parameter int unsigned R     = cnn_pkg::out_dim(cnn_pkg::H_DEF, cnn_pkg::K_DEF, cnn_pkg::S_DEF, cnn_pkg::P_DEF),
  parameter int unsigned C     = cnn_pkg::out_dim(cnn_pkg::W_DEF, cnn_pkg::K_DEF, cnn_pkg::S_DEF, cnn_pkg::P_DEF),
  parameter int unsigned ACC_W = cnn_pkg::ACC_W_DEF,
  localparam int unsigned DEPTH = M * R * C,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  logic signed [ACC_W-1:0] wr_data,
  input  logic [AW-1:0]           rd_addr,
  output logic signed [ACC_W-1:0] rd_data
);

  logic signed [ACC_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
