// modified_hybrid_cska_tb: the default 32-bit hybrid CSKA (13 stages, 5-bit
// Ladner-Fischer nucleus at bits 17..21) on corner cases and random operands,
// plus two small stage distributions exhaustively: an even number of stages
// (carry-out leaves complemented and must be restored) and an odd one.
// two_cycle must equal the propagate of the nucleus bits.
module modified_hybrid_cska_tb;
  localparam int NUC_LSB = 17;  // 1+1+1+2+2+3+3+4
  localparam int NUC_SZ  = 5;

  logic [31:0] a, b, s;
  logic        cin, cout, two;
  logic [7:0]  xa, xb, xs;       // sizes 1,2,3,2 (nucleus = 3rd stage)
  logic        xcin, xcout, xtwo;
  logic [6:0]  ya, yb, ys;       // sizes 2,3,2 (nucleus = 2nd stage)
  logic        ycout, ytwo;
  int checks = 0, failures = 0;
  int long_seen = 0;

  modified_hybrid_cska dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout), .two_cycle(two));
  modified_hybrid_cska #(.NSTAGES(4), .STAGE_SIZE({8'd2, 8'd3, 8'd2, 8'd1})) dut_even (
    .a(xa), .b(xb), .cin(xcin), .sum(xs), .cout(xcout), .two_cycle(xtwo));
  modified_hybrid_cska #(.NSTAGES(3), .STAGE_SIZE({8'd2, 8'd3, 8'd2})) dut_odd (
    .a(ya), .b(yb), .cin(xcin), .sum(ys), .cout(ycout), .two_cycle(ytwo));

  task automatic check32();
    logic [32:0] expect_v;
    logic        expect_two;
    #1;
    expect_v   = 33'(a) + 33'(b) + 33'(cin);
    expect_two = ((a[NUC_LSB +: NUC_SZ] ^ b[NUC_LSB +: NUC_SZ]) == '1);
    checks++;
    if ({cout, s} != expect_v || two != expect_two) begin
      failures++;
      $display("FAIL32 a=%h b=%h cin=%0d -> %0d/%h two=%0d (want %h two=%0d)",
               a, b, cin, cout, s, two, expect_v, expect_two);
    end
    if (two) long_seen++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '0; cin = 1'b1; check32();
    a = '1; b = '1; cin = 1'b1; check32();
    a = '0; b = '0; cin = 1'b0; check32();
    a = 32'h0001_0000; b = 32'h0001_0000; cin = 1'b0; check32();
    // a carry generated in every bit position, propagated to the top
    for (int i = 0; i < 32; i++) begin
      a = 32'hFFFF_FFFF << i; b = 32'(1) << i; cin = 1'b0; check32();
      a = 32'hFFFF_FFFF >> i; b = 32'(1) << (31 - i); cin = 1'b1; check32();
    end
    for (int n = 0; n < 50000; n++) begin
      a = $urandom;
      b = $urandom;
      if (n % 3 == 0) b = ~a ^ (32'(1) << ($urandom % 32));
      cin = 1'($urandom);
      check32();
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {xcin, xa, xb} = 17'(v);
      ya = xa[6:0];
      yb = xb[6:0];
      #1;
      checks += 2;
      if ({xcout, xs} != 9'(int'(xa) + int'(xb) + int'(xcin)) || xtwo != ((xa[5:3] ^ xb[5:3]) == '1)) begin
        failures++;
        $display("FAIL even a=%h b=%h c=%0d -> %0d/%h", xa, xb, xcin, xcout, xs);
      end
      if ({ycout, ys} != 8'(int'(ya) + int'(yb) + int'(xcin)) || ytwo != ((ya[4:2] ^ yb[4:2]) == '1)) begin
        failures++;
        $display("FAIL odd a=%h b=%h c=%0d -> %0d/%h", ya, yb, xcin, ycout, ys);
      end
    end
    checks++;
    if (long_seen == 0) begin
      failures++;
      $display("FAIL the long-path prediction never fired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
