// skip_logic_tb: exhaustive check of the AOI and OAI skip gates.  The AOI
// form must give ~(g | p & c) from a true carry, the OAI form g | p & c from
// a complemented carry.
module skip_logic_tb;
  logic g, p, c, y_aoi, y_oai;
  int checks = 0, failures = 0;

  skip_logic #(.INV_IN(1'b0)) dut_aoi (.g(g), .p(p), .carry_i(c),  .carry_o(y_aoi));
  skip_logic #(.INV_IN(1'b1)) dut_oai (.g(g), .p(p), .carry_i(~c), .carry_o(y_oai));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expect_c;
      {g, p, c} = 3'(v);
      #1;
      expect_c = g || (p && c);
      checks += 2;
      if (y_aoi != !expect_c) begin
        failures++;
        $display("FAIL AOI g=%0d p=%0d c=%0d -> %0d", g, p, c, y_aoi);
      end
      if (y_oai != expect_c) begin
        failures++;
        $display("FAIL OAI g=%0d p=%0d c=%0d -> %0d", g, p, c, y_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
