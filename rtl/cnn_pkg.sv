// Shared types and helpers of the CNN convolution accelerator.
//
// Data words are IEEE-754 single precision (fp32_t), as the accelerator computes
// in floating point (its throughput is quoted in GFLOPS). A convolutional layer is
// described at run time by layer_cfg_t, the six parameters R, C, M, N, K, S of the
// loop nest
//   out[m][r][c] += w[m][n][i][j] * in[n][S*r+i][S*c+j]
// with R x C output pixels, M output and N input feature maps, a K x K kernel and
// stride S. The field widths are a choice of this design: 12 bits cover every
// layer of AlexNet, 4 bits a kernel of up to 15 and 3 bits a stride of up to 7.
package cnn_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    logic [11:0] r;  // output rows
    logic [11:0] c;  // output columns
    logic [11:0] m;  // output feature maps
    logic [11:0] n;  // input feature maps
    logic [3:0]  k;  // kernel size
    logic [2:0]  s;  // stride
  } layer_cfg_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;

endpackage
