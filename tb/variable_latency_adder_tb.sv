// variable_latency_adder_tb: random stream of operations through the 32-bit
// variable latency adder with random gaps.  Every result is compared with
// a + b + cin, and its latency with the prediction worked out here from the
// operands (nucleus bits 17..21 all propagating -> long): a short operation
// must show out_valid two clock edges after it was accepted, a long one
// three.  The run must contain short operations, long operations and at
// least one stall of a waiting operation behind a long one.
module variable_latency_adder_tb;
  localparam int NUM_OPS = 4000;

  typedef struct {
    logic [31:0] a, b;
    logic        cin;
    int          cycle;
  } op_t;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_ready, cin = 1'b0;
  logic [31:0] a = '0, b = '0, sum;
  logic        out_valid, cout, out_two_cycle;
  int checks = 0, failures = 0;
  int cycle = 0, accepted = 0, completed = 0;
  int n_short = 0, n_long = 0, n_stall = 0;
  logic accepted_last = 1'b0;
  op_t  pending[$];

  variable_latency_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .cin(cin), .out_valid(out_valid), .sum(sum), .cout(cout),
    .out_two_cycle(out_two_cycle));

  always #5 clk = ~clk;

  initial begin
    repeat (NUM_OPS * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor and scoreboard
  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
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
          if ({cout, sum} != expect_v || out_two_cycle != expect_long ||
              cycle - op.cycle != expect_lat) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%0d -> %0d/%h long=%0d lat=%0d (want %h long=%0d lat=%0d)",
                     op.a, op.b, op.cin, cout, sum, out_two_cycle, cycle - op.cycle,
                     expect_v, expect_long, expect_lat);
          end
        end
        completed++;
      end
    end
  end

  // stimulus: hold an offered operation until it is accepted
  always @(negedge clk) begin
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

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (completed == NUM_OPS);
    repeat (5) @(posedge clk);
    checks += 4;
    if (accepted != NUM_OPS || pending.size() != 0) begin
      failures++;
      $display("FAIL accepted=%0d outstanding=%0d", accepted, pending.size());
    end
    if (n_short == 0) begin failures++; $display("FAIL no short operation"); end
    if (n_long == 0)  begin failures++; $display("FAIL no long operation"); end
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    $display("short=%0d long=%0d stalls=%0d", n_short, n_long, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
