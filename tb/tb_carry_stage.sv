// tb_carry_stage: self-check of the 16-bit carry network.
// Random p and g vectors, plus long propagate runs across unit boundaries,
// are compared with a bit-serial ripple recurrence starting from carry 0.
module tb_carry_stage;
  logic [15:0] p, g, cg;
  logic        cout;
  int checks = 0, failures = 0;

  carry_stage #(.WIDTH(16), .GROUP(4)) dut (.p(p), .g(g), .cg(cg), .cout(cout));

  task automatic check();
    logic [16:0] c;
    #1;
    c[0] = 1'b0;
    for (int i = 0; i < 16; i++) c[i+1] = g[i] | (p[i] & c[i]);
    checks++;
    if (cg !== c[15:0] || cout !== c[16]) begin
      failures++;
      $display("FAIL p=%h g=%h: cg=%h cout=%b, expected %h %b", p, g, cg, cout, c[15:0], c[16]);
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
    // A carry born at bit j, propagated through every bit above it.
    for (int j = 0; j < 16; j++) begin
      g = 16'(1) << j;
      p = ~16'(0);
      check();
    end
    for (int n = 0; n < 4000; n++) begin
      p = 16'($urandom);
      g = 16'($urandom) & ~p;   // half adders never set p and g together
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
