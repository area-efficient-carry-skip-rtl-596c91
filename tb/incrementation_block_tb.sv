// incrementation_block_tb: exhaustive check of the half-adder chain,
// sum = (z + cin) mod 2**M, for M = 5 and M = 1.
module incrementation_block_tb;
  localparam int M = 5;
  logic [M-1:0] z, sum;
  logic         cin, s1;
  int checks = 0, failures = 0;

  incrementation_block #(.M(M)) dut (.z(z), .cin(cin), .sum(sum));
  incrementation_block #(.M(1)) dut1 (.z(z[0]), .cin(cin), .sum(s1));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (M+1)); v++) begin
      {cin, z} = (M+1)'(v);
      #1;
      checks += 2;
      if (sum != M'(int'(z) + int'(cin))) begin
        failures++;
        $display("FAIL z=%0d cin=%0d -> %0d", z, cin, sum);
      end
      if (s1 != (z[0] ^ cin)) begin
        failures++;
        $display("FAIL 1-bit z=%0d cin=%0d", z[0], cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
