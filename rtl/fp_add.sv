// fp_add: combinational IEEE-754 single-precision adder.
//
// Used for the sums of the marginalization. The operand of larger magnitude is
// kept, the other is shifted right to its exponent with guard, round and sticky
// bits, the two significands are added or subtracted, the result is normalised
// (one place right on a carry, a leading-zero count to the left after a
// cancellation) and rounded to nearest, ties to even. As in fp_mul, subnormal
// inputs read as zero, results below the normal range flush to signed zero,
// overflow gives infinity and invalid operations give the quiet NaN
// 0x7fc00000; these are this design's choices. An exact cancellation gives +0.
//
// Interface: a, b in, y out, no clock; the result is valid in the same cycle.
module fp_add
  import fg_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t y
);

  function automatic logic [4:0] lzc27(logic [26:0] v);
    logic [4:0] n;
    n = 5'd27;
    for (int i = 0; i < 27; i++) begin
      if (v[i]) n = 5'(26 - i);
    end
    return n;
  endfunction

  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        swap, s_big, s_small, eff_sub;
  logic [7:0]  e_big, e_small, d;
  logic [23:0] m_big, m_small;
  logic [49:0] wide;
  logic [26:0] big_ext, aligned, norm;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [23:0] m;
  logic        round_up;
  logic [24:0] mr;
  logic signed [10:0] e_n;

  always_comb begin
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    a_inf  = (a[30:23] == 8'hff) && (a[22:0] == 23'd0);
    b_inf  = (b[30:23] == 8'hff) && (b[22:0] == 23'd0);
    a_nan  = (a[30:23] == 8'hff) && (a[22:0] != 23'd0);
    b_nan  = (b[30:23] == 8'hff) && (b[22:0] != 23'd0);

    // larger magnitude first (subnormals already count as zero)
    swap    = (b_zero ? 31'd0 : b[30:0]) > (a_zero ? 31'd0 : a[30:0]);
    s_big   = swap ? b[31] : a[31];
    s_small = swap ? a[31] : b[31];
    e_big   = swap ? b[30:23] : a[30:23];
    e_small = swap ? a[30:23] : b[30:23];
    m_big   = (swap ? b_zero : a_zero) ? 24'd0 : {1'b1, swap ? b[22:0] : a[22:0]};
    m_small = (swap ? a_zero : b_zero) ? 24'd0 : {1'b1, swap ? a[22:0] : b[22:0]};
    eff_sub = s_big ^ s_small;
    d       = e_big - e_small;

    // alignment with guard, round and sticky bits
    wide = {m_small, 26'd0};
    if (d >= 8'd50) begin
      aligned = {26'd0, |m_small};
    end else begin
      wide    = wide >> d;
      aligned = {wide[49:24], |wide[23:0]};
    end
    big_ext = {m_big, 3'b000};
    sum     = eff_sub ? ({1'b0, big_ext} - {1'b0, aligned})
                      : ({1'b0, big_ext} + {1'b0, aligned});

    // normalisation
    lz = 5'd0;
    if (sum[27]) begin
      norm = {sum[27:2], sum[1] | sum[0]};
      e_n  = $signed({3'b000, e_big}) + 11'sd1;
    end else begin
      lz   = lzc27(sum[26:0]);
      norm = sum[26:0] << lz;
      e_n  = $signed({3'b000, e_big}) - $signed({6'd0, lz});
    end

    // round to nearest, ties to even
    m        = norm[26:3];
    round_up = norm[2] & (norm[1] | norm[0] | m[0]);
    mr       = {1'b0, m} + {24'd0, round_up};
    if (mr[24]) begin
      mr  = mr >> 1;
      e_n = e_n + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]))) begin
      y = FP_QNAN;
    end else if (a_inf) begin
      y = {a[31], 8'hff, 23'd0};
    end else if (b_inf) begin
      y = {b[31], 8'hff, 23'd0};
    end else if (a_zero && b_zero) begin
      y = {a[31] & b[31], 31'd0};
    end else if (sum == 28'd0) begin
      y = FP_ZERO;
    end else if (e_n <= 11'sd0) begin
      y = {s_big, 31'd0};
    end else if (e_n >= 11'sd255) begin
      y = {s_big, 8'hff, 23'd0};
    end else begin
      y = {s_big, e_n[7:0], mr[22:0]};
    end
  end

endmodule
