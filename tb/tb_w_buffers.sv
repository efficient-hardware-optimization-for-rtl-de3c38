// tb_w_buffers: writes a random kernel into the kernel registers word by
// word, in a shuffled order, and checks every register; then overwrites one
// word and checks that only that register changed.
module tb_w_buffers;
  localparam int N = 3, K = 5, D = N*K*K;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [6:0] idx = '0;
  logic signed [15:0] din = '0;
  logic signed [15:0] wts [N][K][K];
  int checks = 0, failures = 0;
  logic signed [15:0] v [D];
  int order [D];

  w_buffers #(.N(N), .K(K), .DATA_W(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int n = 0; n < N; n++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) begin
      checks++;
      if (wts[n][ky][kx] !== v[(n*K + ky)*K + kx]) begin
        failures++;
        $display("wts[%0d][%0d][%0d]=%0d expected %0d", n, ky, kx, wts[n][ky][kx], v[(n*K+ky)*K+kx]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin v[i] = 16'($urandom); order[i] = i; end
    for (int i = D - 1; i > 0; i--) begin
      int j, tmp;
      j = int'($urandom % (i + 1)); tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; idx = 7'(order[i]); din = v[order[i]];
    end
    @(negedge clk); we = 0; idx = 7'(5); din = 16'h7fff;
    @(negedge clk);
    check_all();
    v[37] = 16'h1234;
    we = 1; idx = 7'(37); din = v[37];
    @(negedge clk); we = 0;
    @(negedge clk);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
