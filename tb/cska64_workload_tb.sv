// cska64_workload_tb: a 64-bit hybrid CSKA whose nucleus is a 16-bit
// Ladner-Fischer adder, built from the same RTL by overriding the stage list
// (stage 1..14: 1,1,2,2,3,4,5,6,7,16,7,5,3,2; the distribution is this
// testbench's choice, rising to the nucleus and falling after it).  Random,
// carry-chain and corner operands are checked against 65-bit integer
// addition, and the two-cycle prediction against the nucleus bits 31..46.
module cska64_workload_tb;
  localparam int NUC_LSB = 31;  // 1+1+2+2+3+4+5+6+7

  logic [63:0] a, b, s;
  logic        cin, cout, two;
  int checks = 0, failures = 0, n_long = 0;

  modified_hybrid_cska #(
    .NSTAGES   (14),
    .STAGE_SIZE({8'd2, 8'd3, 8'd5, 8'd7, 8'd16, 8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd2, 8'd1, 8'd1})
  ) dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout), .two_cycle(two));

  task automatic check();
    logic [64:0] expect_v;
    logic        expect_two;
    #1;
    expect_v   = 65'(a) + 65'(b) + 65'(cin);
    expect_two = ((a[NUC_LSB +: 16] ^ b[NUC_LSB +: 16]) == '1);
    checks++;
    if ({cout, s} != expect_v || two != expect_two) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d -> %0d/%h two=%0d", a, b, cin, cout, s, two);
    end
    if (two) n_long++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b0; check();
    for (int i = 0; i < 64; i++) begin
      a = 64'hFFFF_FFFF_FFFF_FFFF << i; b = 64'(1) << i; cin = 1'b0; check();
    end
    for (int n = 0; n < 50000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (n % 3 == 0) b = ~a ^ (64'(1) << ($urandom % 64));
      cin = 1'($urandom);
      check();
    end
    checks++;
    if (n_long == 0) begin
      failures++;
      $display("FAIL the long-path prediction never fired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
