// conv_run: one self-checking layer run of the accelerator at the given
// size, used by the workload testbench. It loads random signed inputs,
// kernels and biases (values limited to +/-VMAX), runs one pass, checks the
// pass length M*(N*K*K + (H+2P)*(W+2P) + 6) + 1 cycles, and compares every
// output word with a padded, strided convolution + bias + ReLU computed
// here. It counts padded positions, windows skipped by the stride and
// ReLU clamps, and reports its totals on its outputs once finished is high.
module conv_run #(
  parameter int N = 3, M = 6, K = 5, H = 28, W = 28, S = 1, P = 0,
  parameter int VMAX = 32767
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_pad,
  output int   n_skip,
  output int   n_clamp
);
  localparam int R = (H + 2*P - K) / S + 1, C = (W + 2*P - K) / S + 1;
  localparam int NKK = N * K * K;
  localparam int LD_MAX = (N*H*W > M*NKK) ? N*H*W : M*NKK;
  localparam int LD_AW = $clog2(LD_MAX);
  localparam int OAW = $clog2(M*R*C);

  logic rst_n = 0;
  logic ld_valid = 0;
  cnn_pkg::ld_sel_e ld_sel = cnn_pkg::LD_IFM;
  logic [LD_AW-1:0] ld_addr = '0;
  logic signed [15:0] ld_data = '0;
  logic start = 0, busy, done;
  logic [OAW-1:0] ofm_rd_addr = '0;
  logic signed [39:0] ofm_rd_data;

  cnn_accel_top #(.N(N), .M(M), .K(K), .H(H), .W(W), .S(S), .P(P)) dut (.*);

  int ifm [N][H][W];
  int wt  [M][N][K][K];
  int bs  [M];
  longint ref_out [M][R][C];
  longint cycle = 0;

  initial begin
    finished = 0; checks = 0; failures = 0; n_pad = 0; n_skip = 0; n_clamp = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && dut.ifm_valid && dut.ifm_pad) n_pad++;
    if (rst_n && dut.u_ibuf.in_valid && !dut.u_ibuf.patch_ok &&
        int'(dut.u_ibuf.y) >= K-1 && int'(dut.u_ibuf.x) >= K-1) n_skip++;
  end

  function automatic int rnd();
    return int'($urandom % (2*VMAX + 1)) - VMAX;
  endfunction

  function automatic int pix(int n, int y, int x);
    if (y < 0 || y >= H || x < 0 || x >= W) return 0;
    return ifm[n][y][x];
  endfunction

  task automatic load(input cnn_pkg::ld_sel_e sel, input int addr, input int data);
    @(negedge clk);
    ld_valid = 1; ld_sel = sel; ld_addr = LD_AW'(addr); ld_data = 16'(data);
    @(negedge clk);
    ld_valid = 0;
  endtask

  initial begin
    longint t_start, pre;
    for (int n = 0; n < N; n++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) ifm[n][y][x] = rnd();
    for (int m = 0; m < M; m++) begin
      bs[m] = rnd();
      for (int n = 0; n < N; n++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) wt[m][n][ky][kx] = rnd();
    end
    for (int m = 0; m < M; m++) for (int y = 0; y < R; y++) for (int x = 0; x < C; x++) begin
      pre = bs[m];
      for (int n = 0; n < N; n++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
        pre += longint'(pix(n, S*y+ky-P, S*x+kx-P)) * longint'(wt[m][n][ky][kx]);
      if (pre < 0) begin ref_out[m][y][x] = 0; n_clamp++; end
      else ref_out[m][y][x] = pre;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      load(cnn_pkg::LD_IFM, n*H*W + y*W + x, ifm[n][y][x]);
    for (int m = 0; m < M; m++) begin
      load(cnn_pkg::LD_BIAS, m, bs[m]);
      for (int n = 0; n < N; n++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
        load(cnn_pkg::LD_WEIGHT, ((m*N + n)*K + ky)*K + kx, wt[m][n][ky][kx]);
    end
    @(negedge clk);
    start = 1; t_start = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t_start != longint'(M*(NKK + (H+2*P)*(W+2*P) + 6) + 1)) begin
      failures++;
      $display("%m: pass took %0d cycles, expected %0d", cycle - t_start, M*(NKK + (H+2*P)*(W+2*P) + 6) + 1);
    end
    for (int m = 0; m < M; m++) for (int y = 0; y < R; y++) for (int x = 0; x < C; x++) begin
      ofm_rd_addr = OAW'(m*R*C + y*C + x);
      @(negedge clk);
      checks++;
      if (longint'(ofm_rd_data) != ref_out[m][y][x]) begin
        failures++;
        if (failures < 10) $display("%m: OFM[%0d][%0d][%0d] = %0d, expected %0d", m, y, x, ofm_rd_data, ref_out[m][y][x]);
      end
    end
    $display("%m: %0dx%0dx%0d -> %0dx%0dx%0d, K=%0d S=%0d P=%0d: pad positions=%0d stride skips=%0d relu clamps=%0d",
             N, H, W, M, R, C, K, S, P, n_pad, n_skip, n_clamp);
    finished = 1;
  end
endmodule
