// tb_conv_ctrl: runs the sequencer for a small layer (N=2, M=3, K=2, 3x4
// image, one pixel of zero padding, drain 3) twice and checks, cycle by cycle against a reference
// schedule: the weight addresses of each kernel load, the kernel-register
// writes one cycle behind them, the bias address, the raster restart, the
// walk over the padded image (memory address inside, pad flag on the
// border, both one cycle later for the returned pixel), busy, and the
// single done pulse after M*(N*K*K + (H+2P)*(W+2P) + DRAIN) cycles. start while
// busy must be ignored.
module tb_conv_ctrl;
  localparam int N = 2, M = 3, K = 2, H = 3, W = 4, P = 1, DR = 3;
  localparam int NKK = N*K*K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [1:0] m_idx, b_rd_addr;
  logic [4:0] w_rd_addr;
  logic wb_we, stream_clr, ifm_valid, ifm_pad;
  logic [2:0] wb_idx;
  logic [3:0] ifm_rd_addr;
  int checks = 0, failures = 0, n_pad = 0;

  conv_ctrl #(.N(N), .M(M), .K(K), .H(H), .W(W), .P(P), .DRAIN(DR)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    expect1("padding positions seen", int'(n_pad > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s = %0d, expected %0d", what, got, exp_v); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      int prev_rd_w, prev_idx, prev_stream, prev_pad;
      prev_rd_w = 0; prev_idx = 0; prev_stream = 0; prev_pad = 0;
      @(negedge clk);
      expect1("busy before start", int'(busy), 0);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int m = 0; m < M; m++) begin
        for (int i = 0; i < NKK; i++) begin
          if (pass == 1 && m == 0 && i == 2) start = 1;  // ignored while busy
          expect1("busy", int'(busy), 1);
          expect1("m_idx", int'(m_idx), m);
          expect1("w_rd_addr", int'(w_rd_addr), m*NKK + i);
          expect1("b_rd_addr", int'(b_rd_addr), m);
          expect1("stream_clr", int'(stream_clr), 1);
          expect1("wb_we", int'(wb_we), prev_rd_w);
          if (prev_rd_w) expect1("wb_idx", int'(wb_idx), prev_idx);
          expect1("ifm_valid", int'(ifm_valid), prev_stream);
          prev_rd_w = 1; prev_idx = i; prev_stream = 0;
          @(negedge clk);
          start = 0;
        end
        for (int p = 0; p < (H+2*P)*(W+2*P); p++) begin
          int py, px, in_img;
          py = p / (W+2*P); px = p % (W+2*P);
          in_img = (py >= P) && (py < H+P) && (px >= P) && (px < W+P);
          expect1("stream_clr in stream", int'(stream_clr), 0);
          if (in_img) expect1("ifm_rd_addr", int'(ifm_rd_addr), (py-P)*W + px-P);
          if (prev_stream) expect1("ifm_pad", int'(ifm_pad), prev_pad);
          if (!in_img) n_pad++;
          expect1("wb_we", int'(wb_we), prev_rd_w);
          if (prev_rd_w) expect1("wb_idx", int'(wb_idx), prev_idx);
          expect1("ifm_valid", int'(ifm_valid), prev_stream);
          expect1("done early", int'(done), 0);
          prev_rd_w = 0; prev_stream = 1; prev_pad = !in_img;
          @(negedge clk);
        end
        for (int d = 0; d < DR; d++) begin
          expect1("busy in drain", int'(busy), 1);
          expect1("ifm_valid", int'(ifm_valid), prev_stream);
          if (prev_stream) expect1("ifm_pad", int'(ifm_pad), prev_pad);
          expect1("wb_we in drain", int'(wb_we), 0);
          expect1("done early", int'(done), 0);
          prev_stream = 0;
          @(negedge clk);
        end
      end
      expect1("done", int'(done), 1);
      expect1("busy at done", int'(busy), 0);
      @(negedge clk);
      expect1("done pulse length", int'(done), 0);
    end
    expect1("padding positions seen", int'(n_pad > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
