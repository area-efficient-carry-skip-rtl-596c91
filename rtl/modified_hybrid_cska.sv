// modified_hybrid_cska: variable-stage-size hybrid carry skip adder.
//
// The operands are cut into NSTAGES slices whose sizes STAGE_SIZE lists from
// the least significant stage upwards (default 1,1,1,2,2,3,3,4,5,4,3,2,1 =
// 32 bits).  STAGE_SIZE is a packed list of bytes, index 0 = stage 1, so a
// literal is written from the most significant stage down.  Stage 1 is a plain optimized (CBL) RCA that takes the adder's
// carry-in.  Every later stage is a concatenation/incrementation stage
// (ci_cska_stage), except the nucleus, the largest stage (the first one of
// maximal size, stage 9 by default), which is the Ladner-Fischer modified
// parallel prefix adder (ladner_fischer_ppa).  Stage carries pass through
// AOI gates in even stages and OAI gates in odd ones, so the carry leaving an
// even stage is complemented and the one leaving an odd stage is true; cout
// is put back into true polarity if the last stage is even.
//
// two_cycle is the one-cycle/two-cycle prediction of the variable latency
// scheme: it is the group propagate of the nucleus.  When it is 0 the carry
// chain is cut inside the nucleus and no path crosses it, so every path is a
// short one; when it is 1 a carry may ride from below the nucleus to the top,
// the long path, and the result needs a second cycle (see
// variable_latency_adder).  Using the nucleus propagate as predictor is this
// design's reading of the published block diagram, which shows the
// prediction fed from that signal.
//
// The structure (RCA first stage, CI stages, PPA nucleus, AOI/OAI chain,
// stage sizes) follows the published design; the whole module is
// combinational and has no timing of its own.
module modified_hybrid_cska #(
  parameter int unsigned NSTAGES = cska_pkg::DEFAULT_NSTAGES,
  parameter cska_pkg::stage_size_t [NSTAGES-1:0] STAGE_SIZE = cska_pkg::DEFAULT_STAGE_SIZE,
  localparam int unsigned WIDTH = cska_pkg::sum_sizes(cska_pkg::stage_list_t'(STAGE_SIZE), NSTAGES)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             two_cycle
);
  localparam int unsigned NUCLEUS = cska_pkg::largest_stage(cska_pkg::stage_list_t'(STAGE_SIZE), NSTAGES);

  // carry[k] leaves stage index k; complemented when stage number k+1 is even.
  logic [NSTAGES-1:0] carry;
  logic [NSTAGES-1:0] stage_p;

  for (genvar k = 0; k < NSTAGES; k++) begin : g_stage
    localparam int unsigned LSB = cska_pkg::sum_sizes(cska_pkg::stage_list_t'(STAGE_SIZE), k);
    localparam int unsigned SZ  = int'(STAGE_SIZE[k]);
    // stage number k+1 even -> AOI fed by a true carry
    localparam bit INV_IN = (((k + 1) % 2) == 1);

    if (k == 0) begin : g_first
      optimized_rca #(.M(SZ)) u_rca (
        .a    (a[LSB +: SZ]),
        .b    (b[LSB +: SZ]),
        .cin  (cin),
        .sum  (sum[LSB +: SZ]),
        .cout (carry[k]),
        .grp_p(stage_p[k])
      );
    end else if (k == NUCLEUS) begin : g_nucleus
      ladner_fischer_ppa #(.M(SZ), .INV_IN(INV_IN)) u_ppa (
        .a      (a[LSB +: SZ]),
        .b      (b[LSB +: SZ]),
        .carry_i(carry[k-1]),
        .sum    (sum[LSB +: SZ]),
        .carry_o(carry[k]),
        .grp_p  (stage_p[k])
      );
    end else begin : g_ci
      ci_cska_stage #(.M(SZ), .INV_IN(INV_IN)) u_stage (
        .a      (a[LSB +: SZ]),
        .b      (b[LSB +: SZ]),
        .carry_i(carry[k-1]),
        .sum    (sum[LSB +: SZ]),
        .carry_o(carry[k])
      );
      assign stage_p[k] = 1'b0;  // not used outside the nucleus
    end
  end

  assign cout      = ((NSTAGES % 2) == 0) ? ~carry[NSTAGES-1] : carry[NSTAGES-1];
  assign two_cycle = stage_p[NUCLEUS];

  initial begin
    assert (NUCLEUS != 0)
      else $error("the nucleus must not be the first stage");
  end
endmodule
