// cska_top_tb: end-to-end run of the whole design at its default sizes.
// The integer side gets a random stream of operations with random gaps and
// is scored on value and latency (two edges from acceptance for a short
// operation, three for a long one, predicted here from nucleus bits 17..21).
// Every cycle the floating point side gets a new random operand pair and is
// compared with the exact reference.  Each mechanism must occur at least
// once: short and long integer operations, a stall behind a long one, a
// carry out of the adder; for the floating point adder an alignment shift,
// an effective subtraction, a renormalising left shift after cancellation, a
// right shift after a significand carry, overflow to infinity, a NaN result
// and a flush to zero.
module cska_top_tb;
  import cska_pkg::*;
  import fp_ref_pkg::*;

  localparam int NUM_OPS = 20000;

  typedef struct {
    logic [31:0] a, b;
    logic        cin;
    int          cycle;
  } op_t;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_ready, cin = 1'b0;
  logic [31:0] a = '0, b = '0, sum;
  logic        out_valid, cout, out_two_cycle;
  fp32_t       fp_a = '0, fp_b = '0, fp_y;
  int checks = 0, failures = 0;
  int cycle = 0, accepted = 0, completed = 0;
  int n_short = 0, n_long = 0, n_stall = 0, n_cout = 0;
  int n_align = 0, n_sub = 0, n_lshift = 0, n_rshift = 0, n_ovf = 0, n_nan = 0, n_ftz = 0;
  logic accepted_last = 1'b0;
  op_t  pending[$];

  cska_top dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .a(a), .b(b), .cin(cin),
    .out_valid(out_valid), .sum(sum), .cout(cout), .out_two_cycle(out_two_cycle),
    .fp_a(fp_a), .fp_b(fp_b), .fp_y(fp_y));

  always #5 clk = ~clk;

  initial begin
    repeat (NUM_OPS * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_fp(logic [31:0] x, logic [31:0] y, logic [31:0] r);
    logic finite_nz;
    int   emax;
    finite_nz = x[30:23] != 0 && x[30:23] != 8'hFF && y[30:23] != 0 && y[30:23] != 8'hFF;
    emax      = (x[30:23] > y[30:23]) ? int'(x[30:23]) : int'(y[30:23]);
    if (finite_nz && x[30:23] != y[30:23]) n_align++;
    if (finite_nz && x[31] != y[31]) n_sub++;
    if (finite_nz && x[31] != y[31] && r[30:23] != 0 && int'(r[30:23]) < emax - 1) n_lshift++;
    if (finite_nz && x[31] == y[31] && r[30:23] != 8'hFF && int'(r[30:23]) > emax) n_rshift++;
    if (finite_nz && r[30:23] == 8'hFF) n_ovf++;
    if (r == 32'h7FC0_0000) n_nan++;
    if (finite_nz && r[30:0] == 0 && magnitude(x) != magnitude(y)) n_ftz++;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      logic [31:0] fp_expect;
      cycle++;
      // floating point side
      fp_expect = fp_add_ref(fp_a, fp_b);
      checks++;
      if (fp_y != fp_expect) begin
        failures++;
        $display("FAIL fp %h + %h -> %h (want %h)", fp_a, fp_b, fp_y, fp_expect);
      end
      count_fp(fp_a, fp_b, fp_expect);
      // integer side
      accepted_last <= in_valid && in_ready;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        pending.push_back('{a: a, b: b, cin: cin, cycle: cycle});
        accepted++;
      end
      if (out_valid) begin
        op_t         op;
        logic [32:0] expect_v;
        logic        expect_long;
        int          expect_lat;
        checks++;
        if (pending.size() == 0) begin
          failures++;
          $display("FAIL result with no operation outstanding");
        end else begin
          op          = pending.pop_front();
          expect_v    = 33'(op.a) + 33'(op.b) + 33'(op.cin);
          expect_long = ((op.a[21:17] ^ op.b[21:17]) == 5'h1F);
          expect_lat  = expect_long ? 3 : 2;
          if (expect_long) n_long++; else n_short++;
          if (expect_v[32]) n_cout++;
          if ({cout, sum} != expect_v || out_two_cycle != expect_long ||
              cycle - op.cycle != expect_lat) begin
            failures++;
            $display("FAIL int a=%h b=%h cin=%0d -> %0d/%h long=%0d lat=%0d (want %h long=%0d lat=%0d)",
                     op.a, op.b, op.cin, cout, sum, out_two_cycle, cycle - op.cycle,
                     expect_v, expect_long, expect_lat);
          end
        end
        completed++;
      end
    end
  end

  always @(negedge clk) begin
    logic [63:0] p;
    p    = random_pair();
    fp_a <= p[63:32];
    fp_b <= p[31:0];
    if (rst_n && accepted < NUM_OPS && (!in_valid || accepted_last)) begin
      in_valid <= ($urandom % 5) != 0;
      a        <= $urandom;
      b        <= $urandom;
      cin      <= 1'($urandom);
      if ($urandom % 5 < 2) begin
        logic [31:0] ra;
        ra = $urandom;
        a <= ra;
        b <= (ra ^ 32'h003E_0000) & 32'h003E_0000 | (32'($urandom) & ~32'h003E_0000);
      end
    end else if (rst_n && accepted >= NUM_OPS && accepted_last) begin
      in_valid <= 1'b0;
    end
  end

  task automatic need(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (completed == NUM_OPS);
    repeat (5) @(posedge clk);
    checks++;
    if (accepted != NUM_OPS || pending.size() != 0) begin
      failures++;
      $display("FAIL accepted=%0d outstanding=%0d", accepted, pending.size());
    end
    need(n_short, "one-cycle addition");
    need(n_long, "two-cycle addition");
    need(n_stall, "stall behind a two-cycle addition");
    need(n_cout, "carry out of the integer adder");
    need(n_align, "fp alignment shift");
    need(n_sub, "fp effective subtraction");
    need(n_lshift, "fp left normalisation after cancellation");
    need(n_rshift, "fp right normalisation after significand carry");
    need(n_ovf, "fp overflow to infinity");
    need(n_nan, "fp NaN result");
    need(n_ftz, "fp flush to zero");
    $display("int: short=%0d long=%0d stalls=%0d carry_out=%0d", n_short, n_long, n_stall, n_cout);
    $display("fp: align=%0d sub=%0d lshift=%0d rshift=%0d overflow=%0d nan=%0d flush=%0d",
             n_align, n_sub, n_lshift, n_rshift, n_ovf, n_nan, n_ftz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
