// tb_weight_bram: fills the kernel and bias memories with random words, then
// reads them all back (in reverse order for the weights) and checks each
// read against what was written, one cycle after the address.
module tb_weight_bram;
  localparam int N = 3, M = 6, K = 5, D = M*N*K*K;
  logic clk = 0;
  always #5 clk = ~clk;
  logic w_wr_en = 0, b_wr_en = 0;
  logic [8:0] w_wr_addr = '0, w_rd_addr = '0;
  logic [2:0] b_wr_addr = '0, b_rd_addr = '0;
  logic signed [15:0] w_wr_data = '0, b_wr_data = '0, w_rd_data, b_rd_data;
  int checks = 0, failures = 0;
  logic signed [15:0] wv [D];
  logic signed [15:0] bv [M];

  weight_bram #(.N(N), .M(M), .K(K), .DATA_W(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) wv[i] = 16'($urandom);
    for (int i = 0; i < M; i++) bv[i] = 16'($urandom);
    for (int i = 0; i < D; i++) begin
      @(negedge clk); w_wr_en = 1; w_wr_addr = 9'(i); w_wr_data = wv[i];
      b_wr_en = (i < M); b_wr_addr = 3'(i); b_wr_data = bv[i % M];
    end
    @(negedge clk); w_wr_en = 0; b_wr_en = 0;
    for (int i = 0; i < D; i++) begin
      w_rd_addr = 9'(D - 1 - i);
      b_rd_addr = 3'(i % M);
      @(negedge clk);
      checks++;
      if (w_rd_data !== wv[D-1-i]) begin failures++; $display("w[%0d]=%0d exp %0d", D-1-i, w_rd_data, wv[D-1-i]); end
      checks++;
      if (b_rd_data !== bv[i % M]) begin failures++; $display("b[%0d]=%0d exp %0d", i % M, b_rd_data, bv[i % M]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
