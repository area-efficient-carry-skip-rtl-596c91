// cbl_full_adder: one-bit full adder in common Boolean logic (CBL) form.
//
// Both possible results are formed in parallel and the real carry-in picks
// one of them:
//   carry-in 0 : sum0 = a ^ b,   carry0 = a & b   (a half adder)
//   carry-in 1 : sum1 = ~sum0,   carry1 = a | b   (one inverter, one OR gate)
// A 2-way selector (drawn as a "4:2" mux: two bits in each leg) driven by the
// incoming carry delivers {cout, sum}.  The CBL split, the inverter/OR pair
// for the carry-in-1 case and the selection by the previous carry follow the
// published structure.  The prop output (a ^ b) is exported so a ripple
// chain can form its group propagate without extra XOR gates; that export is
// this design's choice.  Purely combinational.
module cbl_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,   // carry from the previous bit ("previous")
  output logic sum,
  output logic cout,
  output logic prop   // bit propagate a ^ b
);
  logic sum0, carry0, sum1, carry1;

  always_comb begin
    sum0   = a ^ b;
    carry0 = a & b;
    sum1   = ~sum0;
    carry1 = a | b;
    prop   = sum0;
    {cout, sum} = cin ? {carry1, sum1} : {carry0, sum0};
  end
endmodule
