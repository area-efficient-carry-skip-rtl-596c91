// optimized_rca_tb: exhaustive check of a 5-bit and a 1-bit CBL ripple carry
// adder: sum and carry against integer addition, group propagate against
// a ^ b being all ones.
module optimized_rca_tb;
  localparam int M = 5;
  logic [M-1:0] a, b, sum;
  logic         cin, cout, grp_p;
  logic         a1, b1, s1, c1, p1;
  int checks = 0, failures = 0;

  optimized_rca #(.M(M)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .grp_p(grp_p));
  optimized_rca #(.M(1)) dut1 (.a(a1), .b(b1), .cin(cin), .sum(s1), .cout(c1), .grp_p(p1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*M+1)); v++) begin
      {cin, a, b} = (2*M+1)'(v);
      a1 = a[0];
      b1 = b[0];
      #1;
      checks++;
      if ({cout, sum} != (M+1)'(int'(a) + int'(b) + int'(cin)) || grp_p != ((a ^ b) == '1)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> %0d/%0d p=%0d", a, b, cin, cout, sum, grp_p);
      end
      checks++;
      if ({c1, s1} != 2'(int'(a1) + int'(b1) + int'(cin)) || p1 != (a1 ^ b1)) begin
        failures++;
        $display("FAIL 1-bit a=%0d b=%0d cin=%0d", a1, b1, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
