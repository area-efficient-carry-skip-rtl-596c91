// cska_pkg: constants and elaboration-time helpers shared by the carry skip
// adder modules.
//
// DEFAULT_STAGE_SIZE is the variable stage size distribution of the 32-bit
// concatenation/incrementation CSKA: thirteen stages, listed from stage 1
// (least significant) to stage 13, whose sizes rise from 1 bit to a 5-bit
// "nucleus" in stage 9 and fall again to 1 bit.  These numbers follow the
// published stage-size table for the 32-bit design; nothing else here does.
// The helper functions work on any distribution so the adders can be built
// at other widths.
package cska_pkg;

  localparam int unsigned DEFAULT_NSTAGES = 13;

  // One byte per stage.  Index 0 is stage 1 (bits 0..), index 12 is stage
  // 13 (most significant); the pattern is written from stage 13 down to
  // stage 1, i.e. in the same order as the bits of the operands.
  typedef logic [7:0] stage_size_t;
  localparam stage_size_t [DEFAULT_NSTAGES-1:0] DEFAULT_STAGE_SIZE =
    '{8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd4, 8'd3, 8'd3, 8'd2, 8'd2, 8'd1, 8'd1, 8'd1};

  // The helpers below take a stage list of up to MAX_STAGES entries; a
  // shorter list is zero-extended when passed in.
  localparam int unsigned MAX_STAGES = 64;
  typedef stage_size_t [MAX_STAGES-1:0] stage_list_t;

  // Sum of the sizes of stages 0..n-1 (0-based), i.e. the LSB of stage n.
  function automatic int unsigned sum_sizes(stage_list_t sizes, int unsigned n);
    int unsigned acc = 0;
    for (int unsigned i = 0; i < n; i++) acc += int'(sizes[i]);
    return acc;
  endfunction

  // 0-based index of the first stage of maximal size (the nucleus).
  function automatic int unsigned largest_stage(stage_list_t sizes, int unsigned n);
    int unsigned best = 0;
    for (int unsigned i = 1; i < n; i++)
      if (sizes[i] > sizes[best]) best = i;
    return best;
  endfunction

  // Fixed format of the floating point adder (IEEE 754 binary32).
  localparam int unsigned FP_EXP_W  = 8;
  localparam int unsigned FP_FRAC_W = 23;

  typedef struct packed {
    logic                 sign;
    logic [FP_EXP_W-1:0]  exponent;
    logic [FP_FRAC_W-1:0] fraction;
  } fp32_t;

endpackage
