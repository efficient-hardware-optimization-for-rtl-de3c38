// tb_pe: drives a 5x5 processing element with random 16-bit patches and
// kernels, one per cycle (with idle cycles in between), and checks that
// acc equals the dot product two cycles later when acc_clr is set, and the
// running sum of the dot products while acc_clr is low.
module tb_pe;
  localparam int K = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, acc_clr = 0, out_valid;
  logic signed [15:0] pix [K][K], wts [K][K];
  logic signed [39:0] acc;
  int checks = 0, failures = 0, n_accum = 0;

  pe #(.K(K), .DATA_W(16), .ACC_W(40)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, queued when an operand set is applied.
  longint exp_a [512];
  logic   vld_a [512];
  longint run = 0;

  // Outputs for the operands applied 2 cycles ago.
  task automatic check_out(input int j);
    checks++;
    if (out_valid !== vld_a[j]) begin failures++; $display("out_valid %0b expected %0b", out_valid, vld_a[j]); end
    if (vld_a[j]) begin
      checks++;
      if (longint'(acc) != exp_a[j]) begin failures++; $display("acc %0d expected %0d", acc, exp_a[j]); end
    end
  endtask

  initial begin
    for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) begin pix[r][c] = '0; wts[r][c] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      longint dot;
      dot = 0;
      @(negedge clk);
      if (i >= 2) check_out(i - 2);
      in_valid = ($urandom % 4 != 0);
      acc_clr  = (i < 100) ? 1'b1 : ($urandom % 6 == 0);
      if (i < 5) begin  // extreme operands
        for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) begin
          pix[r][c] = 16'sh8000; wts[r][c] = (i % 2) ? 16'sh8000 : 16'sh7fff;
        end
      end else begin
        for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) begin
          pix[r][c] = 16'($urandom); wts[r][c] = 16'($urandom);
        end
      end
      for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) dot += longint'(pix[r][c]) * longint'(wts[r][c]);
      if (in_valid) begin
        if (!acc_clr) n_accum++;
        run = acc_clr ? dot : run + dot;
      end
      vld_a[i] = in_valid;
      exp_a[i] = run;
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_accum == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
