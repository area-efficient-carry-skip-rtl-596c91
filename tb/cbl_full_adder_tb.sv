// cbl_full_adder_tb: exhaustive check of the CBL full adder against a + b + cin.
module cbl_full_adder_tb;
  logic a, b, cin, sum, cout, prop;
  int checks = 0, failures = 0;

  cbl_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .prop(prop));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin)) || prop != (a != b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d sum=%0d prop=%0d", a, b, cin, cout, sum, prop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
