// act_func: bias addition and activation of one output pixel.
//
// Adds the bias of the current output map to the convolution sum and applies
// the rectified linear unit, y = max(0, sum + bias). The bias is a DATA_W
// word at the binary point of the products and is sign-extended. Placing the
// activation between the computation unit and the output memory, with the
// biases fed in there, follows the source design's block diagram; the choice
// of ReLU (the document names it as the usual activation in hardware
// accelerators but does not fix one) is this design's.
//
// Timing: one register stage; y/out_valid follow in_valid by one cycle.
module act_func #(
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W  = cnn_pkg::ACC_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [ACC_W-1:0]  sum,
  input  logic signed [DATA_W-1:0] bias,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y
);

  logic signed [ACC_W-1:0] pre;

  always_comb pre = sum + ACC_W'(bias);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= pre[ACC_W-1] ? '0 : pre;
    end
  end

endmodule
