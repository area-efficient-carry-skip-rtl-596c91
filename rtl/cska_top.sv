// cska_top: the modified hybrid carry skip adder and its floating point
// application, side by side.
//
// Integer side: a 32-bit variable latency adder (variable_latency_adder)
// built on the variable-stage-size hybrid CSKA with a Ladner-Fischer nucleus
// and CBL ripple stages.  Operations enter through in_valid/in_ready and
// leave with a one-cycle out_valid pulse, one cycle after acceptance for a
// short operation and two cycles for one whose nucleus propagates
// (out_two_cycle = 1).
// Floating point side: a combinational binary32 adder (fp_adder) whose
// significand path is a second instance of the same hybrid CSKA.
// The two sides share only clock-free structure; fp_a/fp_b/fp_y have no
// timing of their own.  Bringing both out of one top is this design's choice.
module cska_top
  import cska_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // integer adder
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic        out_valid,
  output logic [31:0] sum,
  output logic        cout,
  output logic        out_two_cycle,
  // floating point adder
  input  fp32_t       fp_a,
  input  fp32_t       fp_b,
  output fp32_t       fp_y
);
  variable_latency_adder u_int (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_ready     (in_ready),
    .a            (a),
    .b            (b),
    .cin          (cin),
    .out_valid    (out_valid),
    .sum          (sum),
    .cout         (cout),
    .out_two_cycle(out_two_cycle)
  );

  fp_adder u_fp (
    .a(fp_a),
    .b(fp_b),
    .y(fp_y)
  );
endmodule
