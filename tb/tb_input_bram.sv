// tb_input_bram: writes random pixels into every bank of the input memory
// through the flat load address, then reads every pixel position and checks
// that all N channels return their own pixel one cycle after the address.
module tb_input_bram;
  localparam int N = 3, H = 28, W = 28;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [11:0] wr_addr = '0;
  logic signed [15:0] wr_data = '0;
  logic [9:0] rd_addr = '0;
  logic signed [15:0] rd_data [N];
  int checks = 0, failures = 0;
  logic signed [15:0] img [N][H*W];

  input_bram #(.N(N), .H(H), .W(W), .DATA_W(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) for (int a = 0; a < H*W; a++) img[n][a] = 16'($urandom);
    for (int n = 0; n < N; n++) for (int a = 0; a < H*W; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 12'(n*H*W + a); wr_data = img[n][a];
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < H*W; a++) begin
      rd_addr = 10'(a);
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        checks++;
        if (rd_data[n] !== img[n][a]) begin
          failures++;
          if (failures < 10) $display("ch %0d addr %0d: %0d expected %0d", n, a, rd_data[n], img[n][a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
