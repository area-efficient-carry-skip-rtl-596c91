// optimized_rca: M-bit ripple carry adder made of CBL full adders.
//
// Bit i is a cbl_full_adder whose carry-in is the carry-out of bit i-1; the
// chain starts at cin.  Besides sum and cout the block delivers the group
// propagate grp_p = AND of all bit propagates, which the carry skip logic of
// a stage needs.  Inside a concatenation/incrementation stage the RCA runs
// with cin = 0 and its sum is only an intermediate result; stage 1 of the
// adder feeds it the adder's real carry-in.  Using CBL cells as the full
// adder follows the published "optimized RCA"; the grp_p output is formed
// here from the cells' propagate outputs.  Combinational, M >= 1.
module optimized_rca #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] sum,
  output logic         cout,
  output logic         grp_p
);
  logic [M:0]   c;
  logic [M-1:0] p;

  assign c[0] = cin;

  for (genvar i = 0; i < M; i++) begin : g_bit
    cbl_full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1]),
      .prop(p[i])
    );
  end

  assign cout  = c[M];
  assign grp_p = &p;
endmodule
