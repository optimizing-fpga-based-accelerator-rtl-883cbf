// Compute engine: Tm processing elements working in parallel.
//
// The Tn input-feature-map words are broadcast to all Tm PEs; PE `to` receives the
// Tn weights w[to][0..Tn-1] and the partial sum of output map `to`. Every cycle
// the engine therefore performs Tm x Tn multiply-accumulates, the unrolled two
// innermost loops (output and input feature maps) of the tiled convolution. The
// default Tm = 64, Tn = 7 gives the 448 PEs (multiplier/adder pairs) of the built
// accelerator.
//
// Timing: x and w in cycle t; psum and first in cycle t+2; acc_out valid in t+2.
module compute_engine
  import cnn_pkg::*;
#(
  parameter int unsigned TM = 64,
  parameter int unsigned TN = 7
) (
  input  logic                     clk,
  input  fp32_t [TN-1:0]           x,
  input  fp32_t [TM-1:0][TN-1:0]   w,
  input  fp32_t [TM-1:0]           psum,
  input  logic                     first,
  output fp32_t [TM-1:0]           acc_out
);

  for (genvar m = 0; m < TM; m++) begin : g_pe
    pe #(.TN(TN)) u_pe (
      .clk    (clk),
      .x      (x),
      .w      (w[m]),
      .psum   (psum[m]),
      .first  (first),
      .acc_out(acc_out[m])
    );
  end

endmodule
