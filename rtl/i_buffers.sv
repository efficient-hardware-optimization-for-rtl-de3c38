// i_buffers: input-feature side of the data cache unit.
//
// One line_buffer and one window_buffer per input channel turn the raster
// stream of N-channel pixels coming out of the input memory into, each
// cycle, N K x K patches at the same position. Raster counters (y, x) track
// the incoming pixel; the patch is marked valid when K-1 full rows and K-1
// columns of the current row have passed (the warm-up of the buffers) and the
// patch's top-left corner lies on the stride grid. out_y/out_x give the
// output pixel the patch produces. The line buffer / window buffer structure
// follows the source design; the stride handling is this design's choice.
// Zero padding is applied upstream: the caller streams the padded image,
// so H and W here are the padded sizes.
//
// Interface: clr restarts the raster at (0,0) (used before each pass over
// the image); in_valid marks one pixel of every channel on din. win,
// win_valid, out_y and out_x are registered and appear on the cycle after
// the pixel that completes the patch. The line buffers are not cleared:
// stale rows are never part of a valid patch.
module i_buffers #(
  parameter int unsigned N      = cnn_pkg::N_DEF,
  parameter int unsigned K      = cnn_pkg::K_DEF,
  parameter int unsigned H      = cnn_pkg::H_DEF,
  parameter int unsigned W      = cnn_pkg::W_DEF,
  parameter int unsigned S      = cnn_pkg::S_DEF,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W_DEF,
  localparam int unsigned R     = cnn_pkg::out_dim(H, K, S),
  localparam int unsigned C     = cnn_pkg::out_dim(W, K, S),
  localparam int unsigned YW    = $clog2(H),
  localparam int unsigned XW    = $clog2(W),
  localparam int unsigned RW    = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned CW    = (C > 1) ? $clog2(C) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] din [N],
  output logic                     win_valid,
  output logic signed [DATA_W-1:0] win [N][K][K],
  output logic [RW-1:0]            out_y,
  output logic [CW-1:0]            out_x
);

  logic [YW-1:0] y;
  logic [XW-1:0] x;
  logic          patch_ok;

  // Is the pixel now arriving the bottom-right corner of a patch on the grid?
  always_comb begin
    patch_ok = (int'(y) >= int'(K) - 1) && (int'(x) >= int'(K) - 1) &&
               (((int'(y) - int'(K) + 1) % int'(S)) == 0) &&
               (((int'(x) - int'(K) + 1) % int'(S)) == 0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      y         <= '0;
      x         <= '0;
      win_valid <= 1'b0;
      out_y     <= '0;
      out_x     <= '0;
    end else begin
      win_valid <= in_valid && patch_ok;
      if (in_valid) begin
        out_y <= RW'((int'(y) - int'(K) + 1) / int'(S));
        out_x <= CW'((int'(x) - int'(K) + 1) / int'(S));
        if (int'(x) == int'(W) - 1) begin
          x <= '0;
          y <= (int'(y) == int'(H) - 1) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_ch
    logic signed [DATA_W-1:0] col [K];

    line_buffer #(.K(K), .W(W), .DATA_W(DATA_W)) u_lb (
      .clk(clk), .shift(in_valid), .din(din[n]), .taps(col)
    );

    window_buffer #(.K(K), .DATA_W(DATA_W)) u_wb (
      .clk(clk), .shift(in_valid), .col_in(col), .win(win[n])
    );
  end

endmodule
