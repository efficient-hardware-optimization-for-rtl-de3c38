// cnn_accel_top: convolution-layer accelerator with channel and kernel
// loops unrolled.
//
// Computes one convolution layer, OFM[m][y][x] = ReLU(bias[m] +
// sum_{n,ky,kx} IFMp[n][S*y+ky][S*x+kx] * Wt[m][n][ky][kx]), where IFMp is
// the input padded with P zeros on every border, producing one output pixel
// per clock cycle. The datapath:
//   input layer   input_bram (N banks, one per channel) and weight_bram
//                 (kernels and biases), filled through the load port;
//   data cache    i_buffers (line buffer + K x K window per channel) turn
//                 the raster stream of the input maps into K x K patches;
//                 w_buffers hold the kernel of the current output map;
//   computation   computation_unit: N PEs of K*K multipliers and an adder
//                 tree each, plus the adder over channels;
//   activation    act_func adds the bias and applies ReLU;
//   output        ofm_bram holds the M output maps for the host to read.
// conv_ctrl sequences the output maps one after another: kernel load
// (N*K*K cycles), one pass over the (H+2P)*(W+2P) padded input positions
// (border positions are zeros made here, not stored), a drain of 6 cycles.
// A full pass takes M*(N*K*K + (H+2P)*(W+2P) + 6) + 1 cycles from the
// cycle start is high to the cycle done is high. The block structure follows the source
// design; widths, the load port, the schedule details and the address
// order are this design's choices.
//
// Load port: ld_valid with ld_sel (cnn_pkg::ld_sel_e) and ld_addr
// (IFM: n*H*W + y*W + x; weight: ((m*N+n)*K+ky)*K+kx; bias: m). Load only
// while busy is low. start begins a pass; done pulses when every output is
// in memory. ofm_rd_addr = m*R*C + y*C + x; ofm_rd_data follows one cycle
// later.
module cnn_accel_top #(
  parameter int unsigned N      = cnn_pkg::N_DEF,
  parameter int unsigned M      = cnn_pkg::M_DEF,
  parameter int unsigned K      = cnn_pkg::K_DEF,
  parameter int unsigned H      = cnn_pkg::H_DEF,
  parameter int unsigned W      = cnn_pkg::W_DEF,
  parameter int unsigned S      = cnn_pkg::S_DEF,
  parameter int unsigned P      = cnn_pkg::P_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W  = cnn_pkg::ACC_W_DEF,
  localparam int unsigned R     = cnn_pkg::out_dim(H, K, S, P),
  localparam int unsigned C     = cnn_pkg::out_dim(W, K, S, P),
  localparam int unsigned NKK   = N * K * K,
  localparam int unsigned LD_MAX = (N * H * W > M * NKK) ? N * H * W : M * NKK,
  localparam int unsigned LD_AW = $clog2(LD_MAX),
  localparam int unsigned OAW   = $clog2(M * R * C),
  localparam int unsigned MW    = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned RW    = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned CW    = (C > 1) ? $clog2(C) : 1,
  // Cycles from the last input-memory read to the last output write.
  localparam int unsigned PIPE  = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld_valid,
  input  cnn_pkg::ld_sel_e         ld_sel,
  input  logic [LD_AW-1:0]         ld_addr,
  input  logic signed [DATA_W-1:0] ld_data,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  input  logic [OAW-1:0]           ofm_rd_addr,
  output logic signed [ACC_W-1:0]  ofm_rd_data
);

  import cnn_pkg::*;

  // Controller.
  logic [MW-1:0]              m_idx;
  logic [$clog2(M*NKK)-1:0]   w_rd_addr;
  logic [MW-1:0]              b_rd_addr;
  logic                       wb_we;
  logic [$clog2(NKK)-1:0]     wb_idx;
  logic                       stream_clr;
  logic [$clog2(H*W)-1:0]     ifm_rd_addr;
  logic                       ifm_valid;
  logic                       ifm_pad;

  conv_ctrl #(.N(N), .M(M), .K(K), .H(H), .W(W), .P(P), .DRAIN(PIPE)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .m_idx(m_idx), .w_rd_addr(w_rd_addr), .b_rd_addr(b_rd_addr),
    .wb_we(wb_we), .wb_idx(wb_idx), .stream_clr(stream_clr),
    .ifm_rd_addr(ifm_rd_addr), .ifm_valid(ifm_valid), .ifm_pad(ifm_pad)
  );

  // Input layer.
  logic signed [DATA_W-1:0] ifm_mem [N];
  logic signed [DATA_W-1:0] ifm_pix [N];
  logic signed [DATA_W-1:0] w_word;
  logic signed [DATA_W-1:0] bias;

  input_bram #(.N(N), .H(H), .W(W), .DATA_W(DATA_W)) u_ibram (
    .clk(clk),
    .wr_en(ld_valid && ld_sel == LD_IFM),
    .wr_addr($clog2(N*H*W)'(ld_addr)), .wr_data(ld_data),
    .rd_addr(ifm_rd_addr), .rd_data(ifm_mem)
  );

  // Zero padding: border positions of the padded image enter as zeros.
  always_comb
    for (int n = 0; n < int'(N); n++) ifm_pix[n] = ifm_pad ? '0 : ifm_mem[n];

  weight_bram #(.N(N), .M(M), .K(K), .DATA_W(DATA_W)) u_wbram (
    .clk(clk),
    .w_wr_en(ld_valid && ld_sel == LD_WEIGHT),
    .w_wr_addr($clog2(M*NKK)'(ld_addr)), .w_wr_data(ld_data),
    .b_wr_en(ld_valid && ld_sel == LD_BIAS),
    .b_wr_addr(MW'(ld_addr)), .b_wr_data(ld_data),
    .w_rd_addr(w_rd_addr), .w_rd_data(w_word),
    .b_rd_addr(b_rd_addr), .b_rd_data(bias)
  );

  // Data cache unit.
  logic                     win_valid;
  logic signed [DATA_W-1:0] win [N][K][K];
  logic [RW-1:0]            out_y;
  logic [CW-1:0]            out_x;
  logic signed [DATA_W-1:0] wts [N][K][K];

  i_buffers #(.N(N), .K(K), .H(H + 2*P), .W(W + 2*P), .S(S), .DATA_W(DATA_W)) u_ibuf (
    .clk(clk), .rst_n(rst_n), .clr(stream_clr), .in_valid(ifm_valid),
    .din(ifm_pix), .win_valid(win_valid), .win(win), .out_y(out_y), .out_x(out_x)
  );

  w_buffers #(.N(N), .K(K), .DATA_W(DATA_W)) u_wbuf (
    .clk(clk), .we(wb_we), .idx(wb_idx), .din(w_word), .wts(wts)
  );

  // Computation unit and activation. Every patch is a complete channel
  // contribution, so each PE restarts its accumulator on every patch.
  logic                    cu_valid;
  logic signed [ACC_W-1:0] cu_sum;
  logic                    act_valid;
  logic signed [ACC_W-1:0] act_y;

  computation_unit #(.N(N), .K(K), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_cu (
    .clk(clk), .rst_n(rst_n), .in_valid(win_valid), .acc_clr(1'b1),
    .pix(win), .wts(wts), .out_valid(cu_valid), .sum(cu_sum)
  );

  act_func #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_act (
    .clk(clk), .rst_n(rst_n), .in_valid(cu_valid), .sum(cu_sum), .bias(bias),
    .out_valid(act_valid), .y(act_y)
  );

  // Output address travels with the data: 3 cycles in the computation unit
  // and 1 in the activation stage.
  localparam int unsigned ADLY = 4;
  logic [OAW-1:0] addr_pipe [ADLY];

  always_ff @(posedge clk) begin
    addr_pipe[0] <= OAW'(int'(m_idx) * int'(R * C) + int'(out_y) * int'(C) + int'(out_x));
    for (int i = 1; i < int'(ADLY); i++) addr_pipe[i] <= addr_pipe[i-1];
  end

  ofm_bram #(.M(M), .R(R), .C(C), .ACC_W(ACC_W)) u_obram (
    .clk(clk), .wr_en(act_valid), .wr_addr(addr_pipe[ADLY-1]), .wr_data(act_y),
    .rd_addr(ofm_rd_addr), .rd_data(ofm_rd_data)
  );

endmodule
