// tb_cnn_accel_top: end-to-end test of the accelerator at its default size
// (3 input channels of 28x28, 6 output maps of 24x24, 5x5 kernels).
//
// Loads random signed 16-bit input maps, kernels and biases through the load
// port, runs one layer pass, and compares every output word with a
// convolution + bias + ReLU computed here in 64-bit integers. It also checks
//   - the pass length: M*(N*K*K + H*W + 6) + 1 cycles from start to done;
//   - the rate: one output pixel per cycle along each output row, and
//     exactly R*C results per output map;
// and counts the mechanisms of the design, failing any that never occurs:
// line-buffer warm-up (input pixels that complete no window), kernel
// reloads between output maps, output-row changes, ReLU clamping a negative
// sum and ReLU passing a positive one.
module tb_cnn_accel_top;
  import cnn_pkg::*;

  localparam int N = N_DEF, M = M_DEF, K = K_DEF, H = H_DEF, W = W_DEF, S = S_DEF;
  localparam int R = (H - K) / S + 1, C = (W - K) / S + 1;
  localparam int NKK = N * K * K;

  logic clk = 0, rst_n = 0;
  logic ld_valid = 0;
  ld_sel_e ld_sel = LD_IFM;
  logic [11:0] ld_addr = '0;
  logic signed [15:0] ld_data = '0;
  logic start = 0, busy, done;
  logic [11:0] ofm_rd_addr = '0;
  logic signed [39:0] ofm_rd_data;

  always #5 clk = ~clk;

  cnn_accel_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ifm [N][H][W];
  int wt  [M][N][K][K];
  int bs  [M];
  longint ref_out [M][R][C];
  int n_clamp = 0, n_pass = 0;

  function automatic int rnd16();
    return int'($signed(16'($urandom)));
  endfunction

  task automatic load(input ld_sel_e sel, input int addr, input int data);
    @(negedge clk);
    ld_valid = 1; ld_sel = sel; ld_addr = 12'(addr); ld_data = 16'(data);
    @(negedge clk);
    ld_valid = 0;
  endtask

  // Mechanism counters, sampled inside the design.
  int n_warm = 0, n_reload = 0, n_rowchg = 0, n_writes = 0, max_run = 0, run = 0;
  int writes_per_map [M];
  logic [1:0] prev_state = '0;
  int last_row = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ibuf.in_valid && !dut.u_ibuf.patch_ok) n_warm++;
    if (dut.u_ctrl.state == 2'd1 && prev_state != 2'd1) n_reload++;
    prev_state <= dut.u_ctrl.state;
    if (dut.act_valid) begin
      int a, mm, yy;
      a = int'(dut.addr_pipe[3]);
      mm = a / (R * C); yy = (a % (R * C)) / C;
      if (mm < M) writes_per_map[mm]++;
      if (yy != last_row) n_rowchg++;
      last_row = yy;
      n_writes++;
      run++;
      if (run > max_run) max_run = run;
    end else run = 0;
  end

  initial begin
    longint t_start, t_done, pre;
    for (int m = 0; m < M; m++) writes_per_map[m] = 0;
    for (int n = 0; n < N; n++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) ifm[n][y][x] = rnd16();
    for (int m = 0; m < M; m++) begin
      bs[m] = rnd16();
      for (int n = 0; n < N; n++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) wt[m][n][ky][kx] = rnd16();
    end
    for (int m = 0; m < M; m++) for (int y = 0; y < R; y++) for (int x = 0; x < C; x++) begin
      pre = bs[m];
      for (int n = 0; n < N; n++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
        pre += longint'(ifm[n][S*y+ky][S*x+kx]) * longint'(wt[m][n][ky][kx]);
      if (pre < 0) begin ref_out[m][y][x] = 0; n_clamp++; end
      else begin ref_out[m][y][x] = pre; if (pre > 0) n_pass++; end
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      load(LD_IFM, n*H*W + y*W + x, ifm[n][y][x]);
    for (int m = 0; m < M; m++) begin
      load(LD_BIAS, m, bs[m]);
      for (int n = 0; n < N; n++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
        load(LD_WEIGHT, ((m*N + n)*K + ky)*K + kx, wt[m][n][ky][kx]);
    end

    @(negedge clk);
    start = 1; t_start = cycle;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) begin failures++; $display("busy not raised after start"); end
    while (!done) @(negedge clk);
    t_done = cycle;
    checks++;
    if (t_done - t_start != longint'(M*(NKK + H*W + 6) + 1)) begin
      failures++;
      $display("pass took %0d cycles, expected %0d", t_done - t_start, M*(NKK + H*W + 6) + 1);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy still high after done"); end

    for (int m = 0; m < M; m++) for (int y = 0; y < R; y++) for (int x = 0; x < C; x++) begin
      ofm_rd_addr = 12'(m*R*C + y*C + x);
      @(negedge clk);
      checks++;
      if (longint'(ofm_rd_data) != ref_out[m][y][x]) begin
        failures++;
        if (failures < 10) $display("OFM[%0d][%0d][%0d] = %0d, expected %0d", m, y, x, ofm_rd_data, ref_out[m][y][x]);
      end
    end

    checks++; if (n_writes != M*R*C) begin failures++; $display("%0d writes, expected %0d", n_writes, M*R*C); end
    for (int m = 0; m < M; m++) begin
      checks++; if (writes_per_map[m] != R*C) begin failures++; $display("map %0d got %0d writes", m, writes_per_map[m]); end
    end
    checks++; if (max_run != C) begin failures++; $display("longest run of back-to-back outputs %0d, expected %0d", max_run, C); end
    checks++; if (n_reload != M) begin failures++; $display("%0d kernel loads, expected %0d", n_reload, M); end
    $display("mechanisms: warm-up pixels=%0d kernel reloads=%0d row changes=%0d relu clamps=%0d relu passes=%0d",
             n_warm, n_reload, n_rowchg, n_clamp, n_pass);
    checks++; if (n_warm == 0)   begin failures++; $display("no warm-up pixels seen"); end
    checks++; if (n_rowchg == 0) begin failures++; $display("no row change seen"); end
    checks++; if (n_clamp == 0)  begin failures++; $display("ReLU never clamped"); end
    checks++; if (n_pass == 0)   begin failures++; $display("ReLU never passed a value"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
