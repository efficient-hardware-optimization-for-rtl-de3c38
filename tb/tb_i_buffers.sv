// tb_i_buffers: streams two random 2-channel 7x8 images (with idle cycles)
// through the input-side data cache with K=3 and stride 2, restarting the
// raster with clr between them. After every cycle it checks win_valid
// against a reference of the warm-up and stride rules, and for every valid
// window checks the output coordinates (raster order) and all N*K*K pixels.
module tb_i_buffers;
  localparam int N = 2, K = 3, H = 7, W = 8, S = 2;
  localparam int R = (H - K) / S + 1, C = (W - K) / S + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_valid = 0, win_valid;
  logic signed [15:0] din [N];
  logic signed [15:0] win [N][K][K];
  logic [1:0] out_y, out_x;
  int checks = 0, failures = 0, n_valid = 0, n_warm = 0, n_skip = 0;
  logic signed [15:0] img [N][H][W];

  i_buffers #(.N(N), .K(K), .H(H), .W(W), .S(S), .DATA_W(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) din[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      int exp_idx;
      exp_idx = 0;
      for (int n = 0; n < N; n++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[n][y][x] = 16'($urandom);
      clr = 1; @(negedge clk); clr = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        bit exp_v;
        while ($urandom % 4 == 0) begin
          in_valid = 0; @(negedge clk);
          checks++; if (win_valid) begin failures++; $display("win_valid on idle cycle"); end
        end
        in_valid = 1;
        for (int n = 0; n < N; n++) din[n] = img[n][y][x];
        @(negedge clk);
        in_valid = 0;
        exp_v = (y >= K-1) && (x >= K-1) && ((y-K+1) % S == 0) && ((x-K+1) % S == 0);
        if (y < K-1 || x < K-1) n_warm++; else if (!exp_v) n_skip++;
        checks++;
        if (win_valid !== exp_v) begin failures++; $display("(%0d,%0d) win_valid=%0b expected %0b", y, x, win_valid, exp_v); end
        if (exp_v && win_valid) begin
          int oy, ox;
          oy = (y-K+1)/S; ox = (x-K+1)/S;
          n_valid++;
          checks++;
          if (int'(out_y) != oy || int'(out_x) != ox || oy*C + ox != exp_idx) begin
            failures++; $display("out (%0d,%0d) expected (%0d,%0d)", out_y, out_x, oy, ox);
          end
          exp_idx++;
          for (int n = 0; n < N; n++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) begin
            checks++;
            if (win[n][ky][kx] !== img[n][oy*S+ky][ox*S+kx]) begin
              failures++;
              $display("win[%0d][%0d][%0d]=%0d expected %0d at (%0d,%0d)", n, ky, kx, win[n][ky][kx], img[n][oy*S+ky][ox*S+kx], oy, ox);
            end
          end
        end
      end
    end
    checks++;
    if (n_valid != 2*R*C) begin failures++; $display("%0d windows, expected %0d", n_valid, 2*R*C); end
    checks++;
    if (n_warm == 0 || n_skip == 0) begin failures++; $display("warm-up %0d stride skips %0d", n_warm, n_skip); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
