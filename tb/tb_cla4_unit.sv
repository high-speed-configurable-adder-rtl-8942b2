// tb_cla4_unit: exhaustive self-check of the 4-bit look-ahead unit.
// All 512 combinations of p, g and carry in are applied. The reference
// carries come from a bit-serial ripple recurrence c[i+1] = g[i] | p[i] & c[i],
// which the look-ahead must reproduce exactly.
module tb_cla4_unit;
  logic [3:0] p, g, cg;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla4_unit #(.N(4)) dut (.p(p), .g(g), .cin(cin), .cg(cg), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] c;
    for (int v = 0; v < 512; v++) begin
      {cin, p, g} = 9'(v);
      #1;
      c[0] = cin;
      for (int i = 0; i < 4; i++) c[i+1] = g[i] | (p[i] & c[i]);
      checks++;
      if (cg !== c[3:0] || cout !== c[4]) begin
        failures++;
        $display("FAIL cin=%b p=%b g=%b: cg=%b cout=%b, expected %b %b", cin, p, g, cg, cout, c[3:0], c[4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
