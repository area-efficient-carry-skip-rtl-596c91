// fp_adder_tb: the binary32 adder against the exact reference in fp_ref_pkg
// on hand-picked cases (rounding ties, carry out of rounding, overflow,
// cancellation to zero, specials) and on random operand pairs.
module fp_adder_tb;
  import cska_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, y;
  int checks = 0, failures = 0;

  fp_adder dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] xa, logic [31:0] xb);
    logic [31:0] expect_y;
    a = xa;
    b = xb;
    #1;
    expect_y = fp_add_ref(xa, xb);
    checks++;
    if (y != expect_y) begin
      failures++;
      $display("FAIL %h + %h -> %h (want %h)", xa, xb, y, expect_y);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000);  // 1 + 1
    check(32'h3F80_0000, 32'hBF80_0000);  // 1 - 1 = +0
    check(32'h8000_0000, 32'h8000_0000);  // -0 + -0
    check(32'h3F80_0000, 32'h3380_0000);  // 1 + 2**-24: tie, stays even
    check(32'h3F80_0001, 32'h3380_0000);  // tie, rounds up to even
    check(32'h3FFF_FFFF, 32'h3400_0000);  // rounding carries into exponent
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);  // overflow to inf
    check(32'h7F80_0000, 32'hFF80_0000);  // inf - inf = NaN
    check(32'h7F80_0000, 32'h3F80_0000);  // inf + 1
    check(32'h7FC0_1234, 32'h3F80_0000);  // NaN
    check(32'h0080_0001, 32'h8080_0000);  // result below 2**-126: flushed
    check(32'h4B80_0000, 32'hBF80_0000);  // 2**24 - 1: long borrow
    check(32'h3F80_0000, 32'h0000_0001);  // subnormal operand reads as 0
    for (int n = 0; n < 200000; n++) begin
      logic [63:0] p;
      p = random_pair();
      if (n % 2 == 0) check(p[63:32], p[31:0]);
      else            check(p[31:0], p[63:32]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
