// incrementation_block: adds a single incoming carry to an M-bit value.
//
// A chain of half adders: bit i produces sum[i] = z[i] ^ c[i] and passes
// c[i+1] = z[i] & c[i], with c[0] = cin.  In a concatenation/incrementation
// CSKA stage, z is the intermediate result of the stage's RCA (computed with
// carry-in 0) and cin is the carry-out of the previous stage, so the final
// stage sum is z + cin.  The carry out of the chain is not needed by the
// adder (the skip logic produces the stage carry) and is not exported.  The
// half-adder chain is the published internal structure.  Combinational.
module incrementation_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] z,    // intermediate result of the stage RCA
  input  logic         cin,  // carry-out of the previous stage (true polarity)
  output logic [M-1:0] sum
);
  logic [M-1:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < M; i++) begin : g_ha
    assign sum[i] = z[i] ^ c[i];
    if (i < M - 1) begin : g_carry
      assign c[i+1] = z[i] & c[i];
    end
  end
endmodule
