// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// The accelerator computes in 32-bit floating point; this unit is the multiply
// of the factor product. It forms the 48-bit product of the two 24-bit
// significands, normalises it by at most one place and rounds to nearest, ties
// to even. Subnormal inputs are read as zero and results below the normal range
// are flushed to signed zero; overflow gives infinity, and a NaN input or
// 0 x inf gives the quiet NaN 0x7fc00000. Flush-to-zero and the NaN encoding
// are this design's choices.
//
// Interface: a, b in, y out, no clock; the result is valid in the same cycle.
module fp_mul
  import fg_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_n, exp_r;

  always_comb begin
    sa = a[31];     sb = b[31];
    ea = a[30:23];  eb = b[30:23];
    fa = a[22:0];   fb = b[22:0];
    sy = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (fa == 23'd0);
    b_inf  = (eb == 8'hff) && (fb == 23'd0);
    a_nan  = (ea == 8'hff) && (fa != 23'd0);
    b_nan  = (eb == 8'hff) && (fb != 23'd0);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_n = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_n  = exp_n + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    exp_r    = exp_n;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_n + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP_QNAN;
    end else if (a_inf || b_inf) begin
      y = {sy, 8'hff, 23'd0};
    end else if (a_zero || b_zero || exp_r <= 11'sd0) begin
      y = {sy, 31'd0};
    end else if (exp_r >= 11'sd255) begin
      y = {sy, 8'hff, 23'd0};
    end else begin
      y = {sy, exp_r[7:0], mant_r[22:0]};
    end
  end

endmodule
