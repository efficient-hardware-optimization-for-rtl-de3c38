// conv_ctrl: sequencer of one convolution-layer pass.
//
// The output maps are computed one after another (output-map loop
// outermost). For each map m the controller
//   WLOAD  reads the N*K*K kernel words of map m from the weight memory and
//          writes them into the kernel registers (one word per cycle; the
//          write trails the read by the memory's one-cycle latency). The
//          bias address is held at m for the whole map. The input-buffer
//          raster is restarted during this phase.
//   STREAM walks the zero-padded image, (H+2P) x (W+2P) positions in
//          raster order, one per cycle. Inside the image it reads the input
//          memory at (y-P)*W + (x-P); on the border it reads nothing and
//          raises ifm_pad so the datapath substitutes a zero. ifm_valid and
//          ifm_pad mark the returned pixels one cycle later. The datapath
//          turns this into one output pixel per cycle once its line buffers
//          are filled.
//   DRAIN  waits DRAIN cycles until the last result has been written, so
//          that the kernel and bias of the next map cannot reach pixels of
//          this one.
// After the last map it pulses done and returns to IDLE. The loop order
// follows the source design's schedule; the state machine itself, the
// word-serial kernel load and the drain are this design's choices.
//
// start is taken in IDLE only. busy is high from the cycle after start
// until the cycle of done.
module conv_ctrl #(
  parameter int unsigned N     = cnn_pkg::N_DEF,
  parameter int unsigned M     = cnn_pkg::M_DEF,
  parameter int unsigned K     = cnn_pkg::K_DEF,
  parameter int unsigned H     = cnn_pkg::H_DEF,
  parameter int unsigned W     = cnn_pkg::W_DEF,
  parameter int unsigned P     = cnn_pkg::P_DEF,
  parameter int unsigned DRAIN = 6,
  localparam int unsigned HP   = H + 2 * P,
  localparam int unsigned WP   = W + 2 * P,
  localparam int unsigned NKK  = N * K * K,
  localparam int unsigned WAW  = $clog2(M * NKK),
  localparam int unsigned IW   = $clog2(NKK),
  localparam int unsigned PAW  = $clog2(H * W),
  localparam int unsigned MW   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned CW   = $clog2(NKK + DRAIN + 1),
  localparam int unsigned YW   = $clog2(HP),
  localparam int unsigned XW   = $clog2(WP)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [MW-1:0]  m_idx,
  output logic [WAW-1:0] w_rd_addr,
  output logic [MW-1:0]  b_rd_addr,
  output logic           wb_we,
  output logic [IW-1:0]  wb_idx,
  output logic           stream_clr,
  output logic [PAW-1:0] ifm_rd_addr,
  output logic           ifm_valid,
  output logic           ifm_pad
);

  typedef enum logic [1:0] {IDLE, WLOAD, STREAM, DRAIN_S} state_e;

  state_e        state;
  logic [CW-1:0] cnt;
  logic          rd_w;    // a weight read was issued last cycle
  logic [IW-1:0] rd_idx;  // kernel index of that read
  logic [YW-1:0] py;      // position in the padded image
  logic [XW-1:0] px;
  logic          in_image;  // (py, px) lies inside the stored image

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      m_idx     <= '0;
      done      <= 1'b0;
      rd_w      <= 1'b0;
      rd_idx    <= '0;
      ifm_valid <= 1'b0;
      ifm_pad   <= 1'b0;
      py        <= '0;
      px        <= '0;
    end else begin
      done      <= 1'b0;
      rd_w      <= (state == WLOAD);
      rd_idx    <= IW'(cnt);
      ifm_valid <= (state == STREAM);
      ifm_pad   <= (state == STREAM) && !in_image;
      unique case (state)
        IDLE: if (start) begin
          state <= WLOAD;
          cnt   <= '0;
          m_idx <= '0;
        end
        WLOAD: begin
          if (int'(cnt) == int'(NKK) - 1) begin
            state <= STREAM;
            cnt   <= '0;
            py    <= '0;
            px    <= '0;
          end else cnt <= cnt + 1'b1;
        end
        STREAM: begin
          if (int'(px) == int'(WP) - 1) begin
            px <= '0;
            if (int'(py) == int'(HP) - 1) state <= DRAIN_S;
            else                          py <= py + 1'b1;
          end else px <= px + 1'b1;
        end
        DRAIN_S: begin
          if (int'(cnt) == int'(DRAIN) - 1) begin
            cnt <= '0;
            if (int'(m_idx) == int'(M) - 1) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              state <= WLOAD;
              m_idx <= m_idx + 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    in_image    = (int'(py) >= int'(P)) && (int'(py) < int'(P + H)) &&
                  (int'(px) >= int'(P)) && (int'(px) < int'(P + W));
    busy        = (state != IDLE);
    w_rd_addr   = WAW'(int'(m_idx) * int'(NKK) + int'(IW'(cnt)));
    b_rd_addr   = m_idx;
    wb_we       = rd_w;
    wb_idx      = rd_idx;
    stream_clr  = (state == WLOAD);
    ifm_rd_addr = in_image ? PAW'((int'(py) - int'(P)) * int'(W) + int'(px) - int'(P)) : '0;
  end

endmodule
