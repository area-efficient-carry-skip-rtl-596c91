// ci_cska_stage: one concatenation/incrementation carry skip stage (used for
// stages 2..Q of the adder, except the nucleus).
//
// The stage's M-bit optimized RCA adds its operand slices with carry-in 0,
// giving an intermediate result z, a carry g and a group propagate p.  The
// skip logic (AOI or OAI, see skip_logic) forms the stage carry-out from g, p
// and the previous stage's carry, and the incrementation block adds the
// previous stage's carry to z for the final sum.  Thus the RCA never waits
// for the incoming carry; only the skip gate and the half-adder chain do.
// INV_IN says whether carry_i arrives complemented (then the gate is an OAI
// and carry_o leaves true) or true (AOI, carry_o complemented).  This
// arrangement follows the published CI-CSKA stage.  Combinational.
module ci_cska_stage #(
  parameter int unsigned M      = 4,
  parameter bit          INV_IN = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         carry_i,
  output logic [M-1:0] sum,
  output logic         carry_o
);
  logic [M-1:0] z;
  logic         g, p, cin_true;

  optimized_rca #(.M(M)) u_rca (
    .a    (a),
    .b    (b),
    .cin  (1'b0),
    .sum  (z),
    .cout (g),
    .grp_p(p)
  );

  skip_logic #(.INV_IN(INV_IN)) u_skip (
    .g      (g),
    .p      (p),
    .carry_i(carry_i),
    .carry_o(carry_o)
  );

  assign cin_true = INV_IN ? ~carry_i : carry_i;

  incrementation_block #(.M(M)) u_inc (
    .z  (z),
    .cin(cin_true),
    .sum(sum)
  );
endmodule
