// pe: processing element for one input channel.
//
// K x K multipliers form the products of a K x K input patch and the matching
// kernel, a balanced adder tree reduces them to one sum (K*K-1 adders), and
// an accumulator (adder plus register with feedback) either restarts from
// that sum (acc_clr) or adds it to the value it holds. The multiplier array,
// adder tree and accumulator follow the processing element of the source
// design; the two pipeline stages and the widths are this design's choices.
//
// Timing: operands on cycle t (in_valid); products are registered at the end
// of t; the tree sum enters the accumulator at the end of t+1, when
// out_valid is high with the new acc. One patch per cycle. The accumulator
// is ACC_W bits wide and the caller sizes it so it does not overflow.
module pe #(
  parameter int unsigned K      = cnn_pkg::K_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W  = cnn_pkg::ACC_W_DEF,
  localparam int unsigned P     = K * K,
  localparam int unsigned LV    = (P > 1) ? $clog2(P) : 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     acc_clr,
  input  logic signed [DATA_W-1:0] pix [K][K],
  input  logic signed [DATA_W-1:0] wts [K][K],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [2*DATA_W-1:0] prod [P];
  logic                       v1;
  logic                       clr1;
  logic signed [ACC_W-1:0]    tree_sum;

  // Stage 1: multipliers.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int ky = 0; ky < int'(K); ky++)
        for (int kx = 0; kx < int'(K); kx++)
          prod[ky*K + kx] <= pix[ky][kx] * wts[ky][kx];
      clr1 <= acc_clr;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  // Adder tree: each level adds neighbouring pairs of the level below; an
  // odd operand is carried up unchanged and joins at a later adder. The
  // levels are computed in place, lowest index first, so no operand is
  // overwritten before it is read.
  always_comb begin
    logic signed [ACC_W-1:0] lvl [P];
    int unsigned cnt;
    for (int i = 0; i < int'(P); i++) lvl[i] = ACC_W'(prod[i]);
    cnt = P;
    for (int l = 0; l < int'(LV); l++) begin
      for (int i = 0; i < int'(P); i++) begin
        if (i < int'(cnt / 2))                          lvl[i] = lvl[2*i] + lvl[2*i+1];
        else if ((cnt % 2 == 1) && (i == int'(cnt / 2))) lvl[i] = lvl[cnt-1];
      end
      cnt = (cnt + 1) / 2;
    end
    tree_sum = lvl[0];
  end

  // Stage 2: accumulator.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) acc <= clr1 ? tree_sum : acc + tree_sum;
    end
  end

endmodule
