// ladner_fischer_ppa_tb: the 16-bit Ladner-Fischer nucleus adder (default
// size, AOI skip gate) is checked on corner cases and random operands, and a
// 5-bit instance with an OAI skip gate (the nucleus of the 32-bit adder) and
// a 3-bit one exhaustively.  Sum and carry against integer addition, grp_p
// against a ^ b being all ones.
module ladner_fischer_ppa_tb;
  logic [15:0] a16, b16, s16;
  logic        c16, co16, p16;
  logic [4:0]  a5, b5, s5;
  logic        c5, co5, p5;
  logic [2:0]  a3, b3, s3;
  logic        co3, p3;
  int checks = 0, failures = 0;

  ladner_fischer_ppa dut16 (.a(a16), .b(b16), .carry_i(c16), .sum(s16), .carry_o(co16), .grp_p(p16));
  ladner_fischer_ppa #(.M(5), .INV_IN(1'b1)) dut5 (
    .a(a5), .b(b5), .carry_i(~c5), .sum(s5), .carry_o(co5), .grp_p(p5));
  ladner_fischer_ppa #(.M(3)) dut3 (.a(a3), .b(b3), .carry_i(c5), .sum(s3), .carry_o(co3), .grp_p(p3));

  task automatic check16();
    #1;
    checks++;
    if ({~co16, s16} != 17'(int'(a16) + int'(b16) + int'(c16)) || p16 != ((a16 ^ b16) == '1)) begin
      failures++;
      $display("FAIL16 a=%h b=%h c=%0d -> co_n=%0d s=%h p=%0d", a16, b16, c16, co16, s16, p16);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners: full propagate, full generate, single carries at each bit
    a16 = 16'hFFFF; b16 = 16'h0000; c16 = 1'b1; check16();
    a16 = 16'hFFFF; b16 = 16'h0000; c16 = 1'b0; check16();
    a16 = 16'hFFFF; b16 = 16'hFFFF; c16 = 1'b1; check16();
    a16 = 16'h5555; b16 = 16'hAAAA; c16 = 1'b1; check16();
    for (int i = 0; i < 16; i++) begin
      a16 = 16'hFFFF >> i; b16 = 16'(1) << (15 - i); c16 = 1'b0; check16();
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (n % 4 == 0) b16 = ~a16 ^ 16'(1 << ($urandom % 16));
      c16 = 1'($urandom);
      check16();
    end
    for (int v = 0; v < (1 << 11); v++) begin
      {c5, a5, b5} = 11'(v);
      a3 = a5[2:0];
      b3 = b5[2:0];
      #1;
      checks += 2;
      if ({co5, s5} != 6'(int'(a5) + int'(b5) + int'(c5)) || p5 != ((a5 ^ b5) == '1)) begin
        failures++;
        $display("FAIL5 a=%0d b=%0d c=%0d -> co=%0d s=%0d", a5, b5, c5, co5, s5);
      end
      if ({~co3, s3} != 4'(int'(a3) + int'(b3) + int'(c5)) || p3 != ((a3 ^ b3) == '1)) begin
        failures++;
        $display("FAIL3 a=%0d b=%0d c=%0d", a3, b3, c5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
