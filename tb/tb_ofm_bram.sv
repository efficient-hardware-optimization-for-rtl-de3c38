// tb_ofm_bram: writes a random 40-bit word to every output-memory address
// and reads each back one cycle after its address.
module tb_ofm_bram;
  localparam int M = 6, R = 24, C = 24, D = M*R*C;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [11:0] wr_addr = '0, rd_addr = '0;
  logic signed [39:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic signed [39:0] v [D];

  ofm_bram #(.M(M), .R(R), .C(C), .ACC_W(40)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) v[i] = {8'($urandom), 32'($urandom)};
    for (int i = 0; i < D; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 12'(i); wr_data = v[i];
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < D; i++) begin
      rd_addr = 12'(i);
      @(negedge clk);
      checks++;
      if (rd_data !== v[i]) begin failures++; if (failures < 10) $display("[%0d]=%0h exp %0h", i, rd_data, v[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
