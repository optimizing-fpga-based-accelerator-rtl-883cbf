// Processing element: Tn multipliers feeding a binary adder tree, then an
// accumulator adder.
//
// Each cycle the PE takes Tn input-feature-map words (shared by all PEs) and its
// own Tn weights, forms the Tn products and reduces them to one partial sum, i.e.
// one step of out[to] += sum over tii of w[to][tii] * in[tii]. The multiplier and
// adder-tree structure is the one of the source design; for Tn not a power of two
// the tree is padded with zero leaves (this design's choice).
//
// Pipeline (this design's choice): stage 1 registers the products, stage 2 the tree
// sum. The accumulator adder is combinational on the stage-2 register: acc_out =
// tree_sum + psum, or tree_sum alone when `first` marks the first contribution to
// an output pixel. `psum` and `first` must be presented two cycles after x/w, which
// is when acc_out is valid. The tree pairs leaves (0,1), (2,3), ... level by level.
module pe
  import cnn_pkg::*;
#(
  parameter int unsigned TN = 7
) (
  input  logic            clk,
  input  fp32_t [TN-1:0]  x,       // input feature map words, one per input map
  input  fp32_t [TN-1:0]  w,       // weights of this output map
  input  fp32_t           psum,    // current partial sum, two cycles after x/w
  input  logic            first,   // ignore psum, two cycles after x/w
  output fp32_t           acc_out  // new partial sum
);

  localparam int unsigned LEVELS = (TN > 1) ? $clog2(TN) : 1;
  localparam int unsigned LEAVES = 1 << LEVELS;

  fp32_t [TN-1:0]     prod;
  fp32_t [TN-1:0]     prod_q;
  fp32_t [2*LEAVES-2:0] node;   // node[0..LEAVES-1] leaves, then each level
  fp32_t              sum_q;
  fp32_t              acc_sum;

  for (genvar t = 0; t < TN; t++) begin : g_mul
    fp_mul u_mul (.a(x[t]), .b(w[t]), .p(prod[t]));
  end

  always_ff @(posedge clk) prod_q <= prod;

  for (genvar l = 0; l < LEAVES; l++) begin : g_leaf
    if (l < TN) begin : g_used
      assign node[l] = prod_q[l];
    end else begin : g_pad
      assign node[l] = FP_ZERO;
    end
  end

  // level lv holds LEAVES>>lv nodes starting at base(lv) = 2*LEAVES - (2*LEAVES>>lv)
  for (genvar lv = 1; lv <= LEVELS; lv++) begin : g_lvl
    localparam int unsigned IN_BASE  = 2*LEAVES - (2*LEAVES >> (lv-1));
    localparam int unsigned OUT_BASE = 2*LEAVES - (2*LEAVES >> lv);
    for (genvar k = 0; k < (LEAVES >> lv); k++) begin : g_add
      fp_add u_add (.a(node[IN_BASE+2*k]), .b(node[IN_BASE+2*k+1]), .s(node[OUT_BASE+k]));
    end
  end

  always_ff @(posedge clk) sum_q <= node[2*LEAVES-2];

  fp_add u_acc (.a(sum_q), .b(psum), .s(acc_sum));

  assign acc_out = first ? sum_q : acc_sum;

endmodule
