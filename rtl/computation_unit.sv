// computation_unit: N processing elements working in parallel.
//
// The kernel and input channel loops are unrolled: PE n multiplies the K x K
// patch of input channel n with the kernel slice of channel n, so all
// N*K*K multiplications for one output pixel happen in the same cycle. A
// registered adder then sums the N partial results into the convolution sum
// of one output pixel. Unrolling over channels and kernel positions (N PEs
// of K*K multipliers each) follows the source design; the cross-channel adder
// and its register stage are this design's choices.
//
// Timing: one patch set per cycle; sum/out_valid follow in_valid by three
// cycles (two in the PEs, one here). acc_clr is forwarded to every PE.
module computation_unit #(
  parameter int unsigned N      = cnn_pkg::N_DEF,
  parameter int unsigned K      = cnn_pkg::K_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W  = cnn_pkg::ACC_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     acc_clr,
  input  logic signed [DATA_W-1:0] pix [N][K][K],
  input  logic signed [DATA_W-1:0] wts [N][K][K],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  sum
);

  logic                    pe_valid [N];
  logic signed [ACC_W-1:0] pe_acc   [N];
  logic signed [ACC_W-1:0] ch_sum;

  for (genvar n = 0; n < N; n++) begin : g_pe
    pe #(.K(K), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_pe (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc_clr(acc_clr),
      .pix(pix[n]), .wts(wts[n]), .out_valid(pe_valid[n]), .acc(pe_acc[n])
    );
  end

  always_comb begin
    ch_sum = '0;
    for (int n = 0; n < int'(N); n++) ch_sum += pe_acc[n];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= pe_valid[0];
      if (pe_valid[0]) sum <= ch_sum;
    end
  end

endmodule
