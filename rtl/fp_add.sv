// Single-precision floating-point adder, combinational.
//
// One adder node of a processing element's adder tree, and its accumulator. The
// operand of larger magnitude is kept, the other significand is aligned to it with
// two extra bits and a sticky bit, the two are added or subtracted, the result is
// renormalised and rounded to nearest, ties to even. As in the multiplier, and by
// this design's choice: subnormals are read as and flushed to zero, overflow gives
// infinity and NaN is not treated specially. An exact cancellation gives +0, and the
// sum of two zeros is -0 only if both are -0, as IEEE-754 prescribes.
//
// Interface: a, b in; s = a + b out, same cycle.
module fp_add
  import cnn_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t s
);

  logic        a_zero, b_zero, swap;
  fp32_t       op_hi, op_lo;
  logic [7:0]  e_hi, e_lo, diff;
  logic [49:0] lo_sh;
  logic [26:0] m_hi, m_lo;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [9:0] exp_w;
  logic        round_up;
  logic [24:0] mant_r;

  always_comb begin
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    swap   = (b[30:0] > a[30:0]);
    op_hi    = swap ? b : a;
    op_lo  = swap ? a : b;
    e_hi   = op_hi[30:23];
    e_lo = op_lo[30:23];
    diff    = e_hi - e_lo;
    m_hi   = {1'b1, op_hi[22:0], 3'b000};
    lo_sh = {1'b1, op_lo[22:0], 26'd0} >> diff;
    m_lo  = {lo_sh[49:24], |lo_sh[23:0]};
    if (diff > 8'd49) m_lo = 27'd1;
    exp_w = $signed({2'b00, e_hi});
    if (op_hi[31] == op_lo[31]) sum = {1'b0, m_hi} + {1'b0, m_lo};
    else                      sum = {1'b0, m_hi} - {1'b0, m_lo};
    // renormalise: one place right on carry-out, or left past leading zeros
    lz = 5'd0;
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      exp_w = exp_w + 10'sd1;
    end else begin
      // the last assignment comes from the highest set bit
      for (int i = 0; i < 27; i++)
        if (sum[i]) lz = 5'(26 - i);
      norm  = sum[26:0] << lz;
      exp_w = exp_w - $signed({5'd0, lz});
    end
    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r   = {1'b0, norm[26:3]} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_w  = exp_w + 10'sd1;
    end
    if (a_zero && b_zero)
      s = {a[31] & b[31], 31'd0};
    else if (b_zero)
      s = a;
    else if (a_zero)
      s = b;
    else if (sum == 28'd0 || exp_w <= 0)
      s = (sum == 28'd0) ? FP_ZERO : {op_hi[31], 31'd0};
    else if (exp_w >= 10'sd255)
      s = {op_hi[31], 8'hff, 23'd0};
    else
      s = {op_hi[31], exp_w[7:0], mant_r[22:0]};
  end

endmodule
