// tb_cmha_group: exhaustive self-check of a 4-bit CMHA group.
// Every pair of 4-bit operands is applied with the mask at 0 and at 1; the
// outputs must equal a ^ b and a & b (exact) or a | b and 0 (masked).
module tb_cmha_group;
  logic       m_x;
  logic [3:0] a, b, p, g;
  int checks = 0, failures = 0;

  cmha_group #(.N(4)) dut (.m_x(m_x), .a(a), .b(b), .p(p), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {m_x, a, b} = 9'(v);
      #1;
      checks++;
      if (m_x ? (p !== (a ^ b) || g !== (a & b)) : (p !== (a | b) || g !== 4'b0)) begin
        failures++;
        $display("FAIL m_x=%b a=%h b=%h: p=%h g=%h", m_x, a, b, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
