// ci_cska_stage_tb: exhaustive check of a 4-bit concatenation/incrementation
// stage in both carry polarities: {carry, sum} must equal a + b + carry-in,
// with the carries complemented where the polarity says so.
module ci_cska_stage_tb;
  localparam int M = 4;
  logic [M-1:0] a, b, s_aoi, s_oai;
  logic         c, co_aoi, co_oai;
  int checks = 0, failures = 0;

  // AOI stage: true carry in, complemented carry out
  ci_cska_stage #(.M(M), .INV_IN(1'b0)) dut_aoi (
    .a(a), .b(b), .carry_i(c), .sum(s_aoi), .carry_o(co_aoi));
  // OAI stage: complemented carry in, true carry out
  ci_cska_stage #(.M(M), .INV_IN(1'b1)) dut_oai (
    .a(a), .b(b), .carry_i(~c), .sum(s_oai), .carry_o(co_oai));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*M+1)); v++) begin
      logic [M:0] expect_v;
      {c, a, b} = (2*M+1)'(v);
      #1;
      expect_v = (M+1)'(int'(a) + int'(b) + int'(c));
      checks += 2;
      if ({~co_aoi, s_aoi} != expect_v) begin
        failures++;
        $display("FAIL AOI a=%0d b=%0d c=%0d -> co_n=%0d s=%0d", a, b, c, co_aoi, s_aoi);
      end
      if ({co_oai, s_oai} != expect_v) begin
        failures++;
        $display("FAIL OAI a=%0d b=%0d c=%0d -> co=%0d s=%0d", a, b, c, co_oai, s_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
