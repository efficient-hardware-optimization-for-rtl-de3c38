// tb_window_buffer: shifts random columns into a 3x3 window (with idle
// cycles in between) and checks after every shift that column c of the
// window holds the column shifted in K-1-c shifts earlier.
module tb_window_buffer;
  localparam int K = 3, T = 100;
  logic clk = 0;
  always #5 clk = ~clk;
  logic shift = 0;
  logic signed [15:0] col_in [K];
  logic signed [15:0] win [K][K];
  int checks = 0, failures = 0;
  logic signed [15:0] hist [T][K];

  window_buffer #(.K(K), .DATA_W(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = 0;
    for (int r = 0; r < K; r++) col_in[r] = '0;
    while (t < T) begin
      @(negedge clk);
      shift = ($urandom % 3 != 0);
      for (int r = 0; r < K; r++) col_in[r] = 16'($urandom);
      if (shift) begin
        for (int r = 0; r < K; r++) hist[t][r] = col_in[r];
        @(negedge clk);
        shift = 0;
        if (t >= K - 1)
          for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) begin
            checks++;
            if (win[r][c] !== hist[t-(K-1-c)][r]) begin
              failures++;
              $display("t=%0d win[%0d][%0d]=%0d expected %0d", t, r, c, win[r][c], hist[t-(K-1-c)][r]);
            end
          end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
