// tb_line_buffer: streams random pixels into a K=3, W=6 line buffer, with
// gaps where shift is low, and checks that tap K-1-j always equals the
// pixel that arrived j rows (j*W shifts) before the current one.
module tb_line_buffer;
  localparam int K = 3, W = 6, T = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  logic shift = 0;
  logic signed [15:0] din = '0;
  logic signed [15:0] taps [K];
  int checks = 0, failures = 0;
  logic signed [15:0] hist [T];

  line_buffer #(.K(K), .W(W), .DATA_W(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = 0;
    while (t < T) begin
      @(negedge clk);
      if ($urandom % 4 == 0) begin
        shift = 0; din = 16'($urandom);
      end else begin
        shift = 1; din = 16'($urandom); hist[t] = din;
        #1;
        if (t >= (K - 1) * W) begin
          for (int j = 0; j < K; j++) begin
            checks++;
            if (taps[K-1-j] !== hist[t - j*W]) begin
              failures++;
              $display("t=%0d tap %0d = %0d expected %0d", t, K-1-j, taps[K-1-j], hist[t - j*W]);
            end
          end
        end
        t++;
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
