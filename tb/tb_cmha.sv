// tb_cmha: exhaustive self-check of the carry-maskable half adder.
// All eight input combinations are applied and compared with a truth table
// written out by hand from the two operating modes (exact half adder when
// m_x = 1; p = a OR b, g = 0 when m_x = 0).
module tb_cmha;
  logic m_x, a, b, p, g;
  int checks = 0, failures = 0;

  cmha dut (.m_x(m_x), .a(a), .b(b), .p(p), .g(g));

  // Expected {p, g} indexed by {m_x, a, b}.
  localparam logic [1:0] EXP [8] = '{
    2'b00, 2'b10, 2'b10, 2'b10,   // masked: OR, no generate
    2'b00, 2'b10, 2'b10, 2'b01    // exact: XOR, AND
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {m_x, a, b} = 3'(v);
      #1;
      checks++;
      if ({p, g} !== EXP[v]) begin
        failures++;
        $display("FAIL m_x=%b a=%b b=%b: p=%b g=%b, expected %b", m_x, a, b, p, g, EXP[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
