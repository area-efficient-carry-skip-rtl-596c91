// fp_ref_pkg: exact reference model for the binary32 adder used by the
// testbenches.  Both operands are turned into integers in units of 2**-149
// (up to 278 bits), added or subtracted exactly, and the exact result is
// rounded once to nearest-even.  Conventions match the adder under test:
// subnormal inputs count as zero, results below 2**-126 flush to a zero with
// the sign of the exact sum, exact cancellation gives +0, -0 + -0 gives -0,
// NaN in or inf - inf gives 0x7FC00000.
package fp_ref_pkg;

  typedef logic [299:0] wide_t;

  function automatic wide_t magnitude(logic [31:0] x);
    wide_t m;
    if (x[30:23] == 8'd0) return '0;
    m = wide_t'({1'b1, x[22:0]});
    return m << (int'(x[30:23]) - 1);
  endfunction

  function automatic logic [31:0] fp_add_ref(logic [31:0] a, logic [31:0] b);
    logic  a_nan, b_nan, a_inf, b_inf, s;
    wide_t xa, xb, mag, rem, half, m;
    int    k, e, sh;

    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    a_inf = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    b_inf = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    if (a_nan || b_nan || (a_inf && b_inf && a[31] != b[31])) return 32'h7FC0_0000;
    if (a_inf) return {a[31], 8'hFF, 23'd0};
    if (b_inf) return {b[31], 8'hFF, 23'd0};
    if (a[30:23] == 0 && b[30:23] == 0) return {a[31] & b[31], 31'd0};

    xa = magnitude(a);
    xb = magnitude(b);
    if (a[31] == b[31]) begin
      mag = xa + xb; s = a[31];
    end else if (xa >= xb) begin
      mag = xa - xb; s = a[31];
    end else begin
      mag = xb - xa; s = b[31];
    end
    if (mag == 0) return 32'd0;

    k = 0;
    for (int i = 0; i < 300; i++) if (mag[i]) k = i;
    e = k - 22;                                 // biased exponent
    if (e < 1) return {s, 31'd0};

    sh   = k - 23;                              // dropped bits
    m    = mag >> sh;
    if (sh > 0) begin
      rem  = mag & ((wide_t'(1) << sh) - 1);
      half = wide_t'(1) << (sh - 1);
      if (rem > half || (rem == half && m[0])) m = m + 1;
    end
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  // Random operand pair with a spread of relations: independent values,
  // nearby exponents, near-cancellation, specials and zeros.
  function automatic logic [63:0] random_pair();
    logic [31:0] x, y;
    int          kind;
    x    = $urandom;
    y    = $urandom;
    kind = $urandom % 10;
    case (kind)
      0, 1: ;                                                  // independent
      2, 3: y[30:23] = x[30:23] + 8'($urandom % 5) - 8'd2;     // close exponents
      4:    y = {~x[31], x[30:0]} ^ 32'($urandom % 8);         // near-cancellation
      5:    begin y = x; y[31] = x[31]; end                    // doubling, ties
      6:    y[30:23] = 8'($urandom % 3) == 0 ? 8'hFF : 8'h00;  // inf/NaN/zero
      7:    begin x[30:23] = 8'hFE; y[30:23] = 8'hFE - 8'($urandom % 3); end  // overflow
      8:    begin x[30:23] = 8'(1 + $urandom % 3); y[30:23] = x[30:23]; y[31] = ~x[31]; end  // underflow
      default: y[30:23] = x[30:23] - 8'(20 + $urandom % 12);   // far apart, sticky
    endcase
    return {x, y};
  endfunction

endpackage
