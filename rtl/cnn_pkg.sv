// cnn_pkg: constants and types shared by the convolution-layer accelerator.
//
// The layer defaults are those of the first convolution layer the design is
// sized for: N = 3 input channels, M = 6 output maps, 5x5 kernels, and a
// 28x28 input image. Stride 1 and no padding give 24x24 output maps; stride
// and zero padding are parameters. Data
// are 16-bit signed two's-complement words; this width, the accumulator width
// and the load-port encoding are choices of this design, not given by the
// source layer description.
package cnn_pkg;

  localparam int unsigned N_DEF      = 3;   // input channels (IFM count)
  localparam int unsigned M_DEF      = 6;   // output maps (kernel sets)
  localparam int unsigned K_DEF      = 5;   // kernel is K x K
  localparam int unsigned H_DEF      = 28;  // IFM height
  localparam int unsigned W_DEF      = 28;  // IFM width
  localparam int unsigned S_DEF      = 1;   // stride
  localparam int unsigned P_DEF      = 0;   // zero padding on each border
  localparam int unsigned DATA_W_DEF = 16;  // pixel / weight / bias width
  localparam int unsigned ACC_W_DEF  = 40;  // accumulator / OFM word width

  // Target of a word written through the accelerator's load port.
  typedef enum logic [1:0] {
    LD_IFM    = 2'd0,  // address n*H*W + y*W + x
    LD_WEIGHT = 2'd1,  // address ((m*N + n)*K + ky)*K + kx
    LD_BIAS   = 2'd2   // address m
  } ld_sel_e;

  // Output map size for a given input size, kernel, stride and padding.
  function automatic int unsigned out_dim(int unsigned in_dim, int unsigned k,
                                          int unsigned s, int unsigned p = 0);
    return (in_dim + 2 * p - k) / s + 1;
  endfunction

endpackage
