// input_bram: input feature map memory (IBRAM), partitioned by channel.
//
// Holds N maps of H x W signed words. Each channel sits in a bank of its own,
// so one read address returns the pixel at that position in all N channels in
// the same cycle; this is what lets the N processing elements run in
// parallel. Partitioning the input memory for parallel access follows the
// source design; partitioning by channel, the single write port and the
// one-cycle read latency are this design's choices.
//
// Write: wr_en with wr_addr = n*H*W + y*W + x.
// Read:  rd_addr = y*W + x; rd_data[n] is valid the cycle after rd_addr.
module input_bram #(
  parameter int unsigned N      = cnn_pkg::N_DEF,
  parameter int unsigned H      = cnn_pkg::H_DEF,
  parameter int unsigned W      = cnn_pkg::W_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF,
  localparam int unsigned DEPTH = H * W,
  localparam int unsigned AW    = $clog2(N * DEPTH),
  localparam int unsigned RAW   = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_addr,
  input  logic signed [DATA_W-1:0] wr_data,
  input  logic [RAW-1:0]           rd_addr,
  output logic signed [DATA_W-1:0] rd_data [N]
);

  for (genvar n = 0; n < N; n++) begin : g_bank
    logic signed [DATA_W-1:0] mem [DEPTH];
    logic bank_hit;
    logic [RAW-1:0] bank_addr;

    // Split the flat load address into bank and offset.
    if (n == 0) begin : g_first
      assign bank_hit = (wr_addr < AW'(DEPTH));
    end else begin : g_other
      assign bank_hit = (wr_addr >= AW'(n * DEPTH)) && (wr_addr < AW'((n + 1) * DEPTH));
    end
    assign bank_addr = RAW'(wr_addr - AW'(n * DEPTH));

    always_ff @(posedge clk) begin
      if (wr_en && bank_hit) mem[bank_addr] <= wr_data;
      rd_data[n] <= mem[rd_addr];
    end
  end

endmodule
