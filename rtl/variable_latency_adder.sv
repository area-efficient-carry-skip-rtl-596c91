// variable_latency_adder: the hybrid CSKA run as a variable latency unit.
//
// The adder is meant to be clocked at a period that covers all of its short
// paths but not the long path that runs from below the nucleus stage across
// it to the top.  The one-cycle/two-cycle prediction of the core (the group
// propagate of the nucleus) tells, from the operands alone, whether the long
// path can be active: if not, the sum is taken one cycle after the operands
// were registered; if so, it is taken one cycle later.
//
// Interface (valid/ready on the input side, a valid pulse on the output):
//   in_valid/in_ready  an operation {a, b, cin} is accepted at a rising edge
//                      where both are 1; operands go to registers.
//   out_valid          1 for exactly one cycle per operation, with sum, cout
//                      and out_two_cycle (whether it took the long route).
// Timing: short operation, accepted at edge k -> result registered at edge
// k+1; long operation -> edge k+2, and in_ready is 0 during its first cycle,
// which stalls the next operation by one cycle.  Back-to-back short
// operations run at one per cycle.  Synchronous active-low reset clears the
// valid flags.  The one-/two-cycle scheme and its predictor are the
// published variable latency idea; the handshake, registers and reset are
// this design's choice.
module variable_latency_adder #(
  parameter int unsigned NSTAGES = cska_pkg::DEFAULT_NSTAGES,
  parameter cska_pkg::stage_size_t [NSTAGES-1:0] STAGE_SIZE = cska_pkg::DEFAULT_STAGE_SIZE,
  localparam int unsigned WIDTH = cska_pkg::sum_sizes(cska_pkg::stage_list_t'(STAGE_SIZE), NSTAGES)
) (
  input  logic             clk,
  input  logic             rst_n,     // synchronous, active low
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             out_two_cycle
);
  logic [WIDTH-1:0] op_a, op_b;
  logic             op_cin;
  logic             op_valid;     // an operation sits in the operand registers
  logic             second;       // it is in its second cycle
  logic [WIDTH-1:0] core_sum;
  logic             core_cout;
  logic             predict_long;
  logic             complete;

  modified_hybrid_cska #(.NSTAGES(NSTAGES), .STAGE_SIZE(STAGE_SIZE)) u_core (
    .a        (op_a),
    .b        (op_b),
    .cin      (op_cin),
    .sum      (core_sum),
    .cout     (core_cout),
    .two_cycle(predict_long)
  );

  assign complete = op_valid && (!predict_long || second);
  assign in_ready = !op_valid || complete;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_valid      <= 1'b0;
      second        <= 1'b0;
      out_valid     <= 1'b0;
      op_a          <= '0;
      op_b          <= '0;
      op_cin        <= 1'b0;
      sum           <= '0;
      cout          <= 1'b0;
      out_two_cycle <= 1'b0;
    end else begin
      out_valid <= complete;
      if (complete) begin
        sum           <= core_sum;
        cout          <= core_cout;
        out_two_cycle <= second;
      end

      if (in_valid && in_ready) begin
        op_a     <= a;
        op_b     <= b;
        op_cin   <= cin;
        op_valid <= 1'b1;
        second   <= 1'b0;
      end else if (complete) begin
        op_valid <= 1'b0;
        second   <= 1'b0;
      end else if (op_valid) begin
        second   <= 1'b1;
      end
    end
  end

  // A pending long operation must hold off the next one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (op_valid && !complete) |-> !in_ready);
  // The second cycle is only ever spent on a predicted long operation.
  assert property (@(posedge clk) disable iff (!rst_n)
                   second |-> predict_long);
endmodule
