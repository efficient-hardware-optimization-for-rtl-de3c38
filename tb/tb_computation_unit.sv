// tb_computation_unit: feeds a new random set of N=3 patches and kernels
// (5x5, 16-bit) every cycle, with occasional idle cycles, and checks that
// three cycles later sum equals the full N*K*K dot product and out_valid
// follows in_valid; a back-to-back run shows one result per cycle.
module tb_computation_unit;
  localparam int N = 3, K = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [15:0] pix [N][K][K], wts [N][K][K];
  logic signed [39:0] sum;
  int checks = 0, failures = 0, run = 0, max_run = 0;

  computation_unit #(.N(N), .K(K), .DATA_W(16), .ACC_W(40)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc_clr(1'b1),
    .pix(pix), .wts(wts), .out_valid(out_valid), .sum(sum));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_a [512];
  logic   vld_a [512];

  // Outputs for the operands applied 3 cycles ago.
  task automatic check_out(input int j);
    checks++;
    if (out_valid !== vld_a[j]) begin failures++; $display("out_valid %0b expected %0b", out_valid, vld_a[j]); end
    if (vld_a[j]) begin
      checks++;
      if (longint'(sum) != exp_a[j]) begin failures++; $display("sum %0d expected %0d", sum, exp_a[j]); end
      run++; if (run > max_run) max_run = run;
    end else run = 0;
  endtask

  initial begin
    for (int n = 0; n < N; n++) for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) begin
      pix[n][r][c] = '0; wts[n][r][c] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      longint dot;
      dot = 0;
      @(negedge clk);
      if (i >= 3) check_out(i - 3);
      in_valid = (i < 50) || ($urandom % 5 != 0);
      for (int n = 0; n < N; n++) for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) begin
        pix[n][r][c] = 16'($urandom); wts[n][r][c] = 16'($urandom);
        dot += longint'(pix[n][r][c]) * longint'(wts[n][r][c]);
      end
      vld_a[i] = in_valid;
      exp_a[i] = dot;
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (max_run < 40) begin failures++; $display("longest back-to-back run %0d", max_run); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
