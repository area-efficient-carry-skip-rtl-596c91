// fp_adder: IEEE 754 single precision adder whose significand adder is the
// modified hybrid CSKA.
//
// Data flow (combinational):
//   1. Unpack; the operand of larger magnitude becomes L, the other S.
//   2. Align: S's 24-bit significand, extended by guard/round/sticky bits to
//      27 bits, is shifted right by the exponent difference; bits shifted out
//      are ORed into the sticky bit.
//   3. Add or subtract (effective subtraction when the signs differ) on the
//      32-bit hybrid CSKA: subtraction feeds the inverted aligned operand and
//      a carry-in of 1.  As |L| >= |S| the result is never negative.
//   4. Normalise: one right shift on a carry out of the significand, or a
//      left shift by the leading-zero count after cancellation.
//   5. Round to nearest, ties to even, from guard, round and sticky; a
//      rounding carry out of the significand bumps the exponent.
// Special cases: NaN in or inf - inf gives the quiet NaN 0x7FC00000; an
// infinite operand otherwise passes through; an exponent of 255 or more
// after rounding gives infinity.  Subnormal inputs are read as zero and
// results below the smallest normal number are flushed to a zero that keeps
// the sign of the exact sum (flush-to-zero).  An exact cancellation gives +0;
// -0 + -0 gives -0.
// Only the use of the modified CSKA inside a floating point adder comes from
// the published design; format, rounding and special-case handling are this
// design's choices, picked as the plainest complete binary32 adder.
module fp_adder
  import cska_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  localparam int unsigned MW = FP_FRAC_W + 1;  // significand with hidden bit
  localparam int unsigned XW = MW + 3;         // plus guard, round, sticky

  function automatic logic [4:0] lead_zeros(logic [XW-1:0] v);
    logic [4:0] n = 5'(XW);
    for (int i = 0; i < XW; i++)
      if (v[i]) n = 5'(XW - 1 - i);
    return n;
  endfunction

  logic          a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [MW-1:0] ma, mb;
  logic          a_big;
  logic          sl, ss, eff_sub;
  logic [7:0]    el, es, ediff;
  logic [MW-1:0] ml, ms;
  logic [XW-1:0] ms_ext, aligned, shifted_out_mask;
  logic [31:0]   op_x, op_y, add_sum;
  logic          add_cout, add_long;  // unused: |L| >= |S| keeps the sum in 28 bits
  logic [XW:0]   raw;
  logic [XW-1:0] norm;
  logic [4:0]    lz;
  logic signed [9:0] exp_n;
  logic          round_up;
  logic [MW:0]   rounded;
  logic signed [9:0] exp_r;

  modified_hybrid_cska u_sig_adder (
    .a        (op_x),
    .b        (op_y),
    .cin      (eff_sub),
    .sum      (add_sum),
    .cout     (add_cout),
    .two_cycle(add_long)
  );

  always_comb begin
    // 1. unpack and order by magnitude
    a_zero = (a.exponent == '0);
    b_zero = (b.exponent == '0);
    a_inf  = (a.exponent == '1) && (a.fraction == '0);
    b_inf  = (b.exponent == '1) && (b.fraction == '0);
    a_nan  = (a.exponent == '1) && (a.fraction != '0);
    b_nan  = (b.exponent == '1) && (b.fraction != '0);
    ma     = a_zero ? '0 : {1'b1, a.fraction};
    mb     = b_zero ? '0 : {1'b1, b.fraction};
    a_big  = {a.exponent, ma} >= {b.exponent, mb};
    sl     = a_big ? a.sign : b.sign;
    ss     = a_big ? b.sign : a.sign;
    el     = a_big ? a.exponent : b.exponent;
    es     = a_big ? b.exponent : a.exponent;
    ml     = a_big ? ma : mb;
    ms     = a_big ? mb : ma;
    eff_sub = sl ^ ss;

    // 2. align with sticky
    ediff  = el - es;
    ms_ext = {ms, 3'b000};
    if (ediff >= 8'(XW)) begin
      shifted_out_mask = '1;
      aligned          = '0;
    end else begin
      shifted_out_mask = ~({XW{1'b1}} << ediff);
      aligned          = ms_ext >> ediff;
    end
    aligned[0] = aligned[0] | (|(ms_ext & shifted_out_mask));

    // 3. significand add / subtract on the hybrid CSKA
    op_x = {{(32-XW){1'b0}}, ml, 3'b000};
    op_y = eff_sub ? ~{{(32-XW){1'b0}}, aligned} : {{(32-XW){1'b0}}, aligned};
    raw  = add_sum[XW:0];

    // 4. normalise
    lz = lead_zeros(raw[XW-1:0]);
    if (raw[XW]) begin
      norm  = raw[XW:1];
      norm[0] = norm[0] | raw[0];
      exp_n = 10'(el) + 10'sd1;
      lz    = '0;
    end else begin
      norm  = raw[XW-1:0] << lz;
      exp_n = 10'(el) - 10'(lz);
    end

    // 5. round to nearest even
    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    rounded  = {1'b0, norm[XW-1:3]} + (MW+1)'(round_up);
    exp_r    = exp_n;
    if (rounded[MW]) begin
      rounded = rounded >> 1;
      exp_r   = exp_n + 10'sd1;
    end

    // pack
    if (a_nan || b_nan || (a_inf && b_inf && (a.sign != b.sign))) begin
      y = '{sign: 1'b0, exponent: '1, fraction: 23'h400000};
    end else if (a_inf || b_inf) begin
      y = '{sign: a_inf ? a.sign : b.sign, exponent: '1, fraction: '0};
    end else if (a_zero && b_zero) begin
      y = '{sign: a.sign & b.sign, exponent: '0, fraction: '0};
    end else if (raw == '0) begin
      y = '{sign: 1'b0, exponent: '0, fraction: '0};
    end else if (exp_r <= 0) begin
      y = '{sign: sl, exponent: '0, fraction: '0};
    end else if (exp_r >= 255) begin
      y = '{sign: sl, exponent: '1, fraction: '0};
    end else begin
      y = '{sign: sl, exponent: exp_r[7:0], fraction: rounded[FP_FRAC_W-1:0]};
    end
  end
endmodule
