// tb_pg_stage: self-check of the propagate/generate stage at 16 bits.
// Every mask value is applied with random operands. For each bit the
// expected p and g come from the mask bit of its group, the top group
// always counting as exact.
module tb_pg_stage;
  logic [15:0] a, b, p, g;
  logic [2:0]  m;
  int checks = 0, failures = 0;

  pg_stage #(.WIDTH(16), .GROUP(4)) dut (.a(a), .b(b), .m(m), .p(p), .g(g));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ep, eg;
    logic        exact;
    for (int n = 0; n < 4000; n++) begin
      m = 3'(n % 8);
      a = 16'($urandom);
      b = 16'($urandom);
      #1;
      for (int i = 0; i < 16; i++) begin
        exact = (i >= 12) ? 1'b1 : m[i / 4];
        ep[i] = exact ? (a[i] ^ b[i]) : (a[i] | b[i]);
        eg[i] = exact & a[i] & b[i];
      end
      checks++;
      if (p !== ep || g !== eg) begin
        failures++;
        $display("FAIL m=%b a=%h b=%h: p=%h g=%h, expected p=%h g=%h", m, a, b, p, g, ep, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
