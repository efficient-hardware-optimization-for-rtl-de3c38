// tb_cnn_accel_workloads: runs the accelerator on three layer shapes side
// by side, each instance checking its own outputs and pass length:
//   a) 3 x 29x29 input, 6 maps of 5x5 kernels, no padding: 25x25 outputs,
//      the output size listed for the first convolution layer;
//   b) 3 x 28x28 input with 2 pixels of zero padding ("same" convolution):
//      28x28 outputs;
//   c) 2 x 9x9 input, 3 maps of 3x3 kernels, stride 2, 1 pixel of padding:
//      5x5 outputs, exercising stride and padding together.
// It fails if padding, stride skipping or ReLU clamping never happened
// where the configuration calls for it.
module tb_cnn_accel_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  logic fa, fb, fc;
  int ca, cb, cc, xa, xb, xc;
  int pa, pb, pc, sa, sb, sc, ra, rb, rc;
  int checks = 0, failures = 0;

  conv_run #(.N(3), .M(6), .K(5), .H(29), .W(29), .S(1), .P(0)) run_a (
    .clk(clk), .finished(fa), .checks(ca), .failures(xa), .n_pad(pa), .n_skip(sa), .n_clamp(ra));
  conv_run #(.N(3), .M(6), .K(5), .H(28), .W(28), .S(1), .P(2)) run_b (
    .clk(clk), .finished(fb), .checks(cb), .failures(xb), .n_pad(pb), .n_skip(sb), .n_clamp(rb));
  conv_run #(.N(2), .M(3), .K(3), .H(9), .W(9), .S(2), .P(1)) run_c (
    .clk(clk), .finished(fc), .checks(cc), .failures(xc), .n_pad(pc), .n_skip(sc), .n_clamp(rc));

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (fa && fb && fc);
    @(negedge clk);
    checks = ca + cb + cc;
    failures = xa + xb + xc;
    checks++; if (pa != 0) begin failures++; $display("padding seen without padding"); end
    checks++; if (pb == 0) begin failures++; $display("no padding positions in run b"); end
    checks++; if (pc == 0) begin failures++; $display("no padding positions in run c"); end
    checks++; if (sc == 0) begin failures++; $display("no stride skips in run c"); end
    checks++; if (sa != 0 || sb != 0) begin failures++; $display("stride skips at stride 1"); end
    checks++; if (ra == 0 || rb == 0 || rc == 0) begin failures++; $display("ReLU never clamped in a run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
