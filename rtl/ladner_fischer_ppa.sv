// ladner_fischer_ppa: the nucleus stage of the hybrid CSKA, an M-bit
// modified parallel prefix adder with a Ladner-Fischer carry network.
//
// Four layers, all combinational:
//   1. Pre-processing: per bit p_i = a_i ^ b_i, g_i = a_i & b_i.
//   2. Prefix network: ceil(log2 M) levels of Ladner-Fischer (minimum depth,
//      divide-and-conquer) black cells.  At level l every bit i whose bit l
//      is set combines with the last bit j of the block of 2**l bits below it:
//      G = G_i | P_i & G_j, P = P_i & P_j; other bits pass through buffers.
//      Afterwards every position holds the group terms G_{i:0}, P_{i:0}.
//      Fan-out grows to M/2 at the last level, depth stays minimal.
//   3. Added level: the stage's incoming carry is merged into every group
//      term by a grey cell, c_{i+1} = G_{i:0} | P_{i:0} & cin.  The network
//      itself never waits for the incoming carry.
//   4. Post-processing: s_i = p_i ^ c_i with c_0 = cin.
// The stage carry-out is produced by the skip gate from the whole-group terms
// (G_{M-1:0}, P_{M-1:0}) exactly as in a ripple stage, so the nucleus keeps
// the AOI/OAI carry chain of the CSKA (INV_IN as in skip_logic).  grp_p, the
// whole-group propagate, drives the one-cycle/two-cycle prediction.
// The four layers, the added level, the skip gate on the group terms and the
// Ladner-Fischer network follow the published nucleus stage; the default
// width of 16 bits is the published Ladner-Fischer width.
module ladner_fischer_ppa #(
  parameter int unsigned M      = 16,
  parameter bit          INV_IN = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         carry_i,  // incoming carry, complemented if INV_IN
  output logic [M-1:0] sum,
  output logic         carry_o,  // outgoing carry, complemented if !INV_IN
  output logic         grp_p     // P_{M-1:0}, input of the latency predictor
);
  localparam int unsigned L = (M > 1) ? $clog2(M) : 0;

  // Level k of the prefix network; level 0 is the pre-processing output.
  logic [L:0][M-1:0] gg, pp;
  logic [M-1:0]      p_bit;
  logic [M-1:0]      c;
  logic              cin_true;

  // 1. pre-processing
  assign p_bit = a ^ b;
  assign pp[0] = p_bit;
  assign gg[0] = a & b;

  // 2. Ladner-Fischer prefix network
  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar i = 0; i < M; i++) begin : g_node
      if (((i >> l) & 1) == 1) begin : g_black
        localparam int unsigned J = ((i >> l) << l) - 1;
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][J]);
        assign pp[l+1][i] = pp[l][i] & pp[l][J];
      end else begin : g_buf
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  assign grp_p = pp[L][M-1];

  // skip gate on the whole-group terms
  skip_logic #(.INV_IN(INV_IN)) u_skip (
    .g      (gg[L][M-1]),
    .p      (pp[L][M-1]),
    .carry_i(carry_i),
    .carry_o(carry_o)
  );

  // 3. added level and 4. post-processing
  assign cin_true = INV_IN ? ~carry_i : carry_i;
  assign c[0]     = cin_true;
  for (genvar i = 0; i < M; i++) begin : g_post
    if (i < M - 1) begin : g_grey
      assign c[i+1] = gg[L][i] | (pp[L][i] & cin_true);
    end
    assign sum[i] = p_bit[i] ^ c[i];
  end
endmodule
