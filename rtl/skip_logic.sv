// skip_logic: carry skip gate of one CSKA stage, as an AOI or an OAI
// compound gate instead of a 2:1 multiplexer.
//
// The stage carry-out is cout = g | (p & cin), where g is the carry-out of
// the stage's RCA (computed with carry-in 0) and p its group propagate.
// Compound gates invert, so the carry changes polarity from stage to stage:
//   INV_IN = 0 (AOI):  carry_i true,        carry_o = ~(g | p & carry_i)
//   INV_IN = 1 (OAI):  carry_i complemented, carry_o = ~(~g & (~p | carry_i))
// The OAI form is fed the complemented g and p, which equals g | p & cin, so
// a chain AOI, OAI, AOI ... alternates complemented and true carries.  The
// use of AOI/OAI gates and the alternating complemented carry follow the
// published structure; the input inversions are written out here.
// Combinational.
module skip_logic #(
  parameter bit INV_IN = 1'b0
) (
  input  logic g,        // stage RCA carry-out, true polarity
  input  logic p,        // stage group propagate, true polarity
  input  logic carry_i,  // incoming carry, complemented when INV_IN = 1
  output logic carry_o   // outgoing carry, complemented when INV_IN = 0
);
  if (INV_IN) begin : g_oai
    logic g_n, p_n;
    assign g_n     = ~g;
    assign p_n     = ~p;
    assign carry_o = ~(g_n & (p_n | carry_i));
  end else begin : g_aoi
    assign carry_o = ~(g | (p & carry_i));
  end
endmodule
