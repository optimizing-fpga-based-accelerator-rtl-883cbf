// Single-precision floating-point multiplier, combinational.
//
// One of the multipliers of a processing element. The product of the two 24-bit
// significands (hidden bit included) is normalised by at most one place and rounded
// to nearest, ties to even, using a guard bit and a sticky bit. Simplifications
// chosen by this design, as the arithmetic details are not part of the source
// description: subnormal inputs are read as zero and subnormal results are flushed
// to signed zero; an exponent overflow gives a signed infinity; NaN inputs are not
// treated specially. The sign of a zero product is the XOR of the operand signs.
//
// Interface: a, b in; p = a * b out, same cycle.
module fp_mul
  import cnn_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  logic        sa, sb, sp;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_w;

  always_comb begin
    sa = a[31];
    sb = b[31];
    ea = a[30:23];
    eb = b[30:23];
    sp = sa ^ sb;
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    exp_w = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_w  = exp_w + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_w  = exp_w + 11'sd1;
    end
    if (ea == 8'd0 || eb == 8'd0 || exp_w <= 0)
      p = {sp, 31'd0};
    else if (exp_w >= 11'sd255)
      p = {sp, 8'hff, 23'd0};
    else
      p = {sp, exp_w[7:0], mant_r[22:0]};
  end

endmodule
