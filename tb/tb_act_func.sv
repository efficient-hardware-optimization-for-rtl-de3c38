// tb_act_func: applies random convolution sums and biases (both signs, plus
// the edge cases sum+bias = 0 and -1) and checks y = max(0, sum + bias)
// one cycle later, with out_valid following in_valid.
module tb_act_func;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [39:0] sum = '0, y;
  logic signed [15:0] bias = '0;
  int checks = 0, failures = 0, n_neg = 0, n_pos = 0;

  act_func #(.DATA_W(16), .ACC_W(40)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint pre, expv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = (i % 5 != 4);
      bias = 16'($urandom);
      if (i == 10)      sum = -40'(bias);
      else if (i == 11) sum = -40'(bias) - 1;
      else              sum = 40'(longint'($urandom % 80000) - 64'sd40000);
      pre = longint'(sum) + longint'(bias);
      expv = (pre < 0) ? 0 : pre;
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("out_valid %0b for in_valid %0b", out_valid, in_valid); end
      if (in_valid) begin
        if (pre < 0) n_neg++; else n_pos++;
        checks++;
        if (longint'(y) != expv) begin failures++; $display("sum %0d bias %0d: y=%0d expected %0d", sum, bias, y, expv); end
      end
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
