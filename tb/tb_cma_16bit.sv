// tb_cma_16bit: end-to-end self-check of the 16-bit configurable adder.
//
// The adder is instantiated with its default parameters. Three kinds of
// stimulus are applied:
//   * the example operands of the published simulation, a = 16'h6524,
//     b = 16'h5361, m = 3'b010, whose result under the published
//     architecture was worked out by hand (17'h0B785), and the same operands
//     in exact mode (17'h0B885 = a + b);
//   * directed corner cases: all-ones plus one, with every group masked and
//     with every group exact;
//   * random operands under all eight mask settings.
// With m = 3'b111 the result must equal a + b. For any other mask the result
// is compared with a bit-serial model: each bit's p and g follow from its
// group's mask (the top group always exact), carries ripple one bit at a time
// from 0, and the sum bit is p XOR carry. Every result is also checked
// against a closed form: a masked bit with a = b = 1 behaves as 1 + 0, so the
// result must equal a + (b & ~(a & b & M)), M having ones in the bits of the
// masked groups. The error against a + b is therefore never negative and
// never more than the value of a & b in the masked bits.
//
// The test also counts how often each mechanism of the adder was exercised:
// each of the three low groups masked and exact, a carry out of bit 15, a
// carry passing through a masked group, and an approximate result that
// differs from the exact sum. A mechanism never seen counts as a failure.
module tb_cma_16bit;
  logic [15:0] a, b;
  logic [2:0]  m;
  logic [16:0] sum_out;
  int checks = 0, failures = 0;

  int n_masked [3];
  int n_exact  [3];
  int n_cout = 0;
  int n_carry_through_mask = 0;
  int n_approx_error = 0;

  cma_16bit dut (.a(a), .b(b), .m(m), .sum_out(sum_out));

  // Bit-serial reference of the configurable addition.
  function automatic logic [16:0] model(logic [15:0] x, logic [15:0] y, logic [2:0] msk,
                                        output logic through_mask);
    logic [16:0] s;
    logic        c, exact, pi, gi;
    c = 1'b0;
    through_mask = 1'b0;
    for (int i = 0; i < 16; i++) begin
      exact = (i >= 12) ? 1'b1 : msk[i / 4];
      pi = exact ? (x[i] ^ y[i]) : (x[i] | y[i]);
      gi = exact & x[i] & y[i];
      if (!exact && c && pi) through_mask = 1'b1;
      s[i] = pi ^ c;
      c = gi | (pi & c);
    end
    s[16] = c;
    return s;
  endfunction

  // Ones in the bit positions of the masked groups.
  function automatic logic [15:0] masked_bits(logic [2:0] msk);
    logic [15:0] mb;
    mb = '0;
    for (int k = 0; k < 3; k++) if (!msk[k]) mb[k*4 +: 4] = 4'hF;
    return mb;
  endfunction

  task automatic apply(logic [15:0] x, logic [15:0] y, logic [2:0] msk);
    logic [16:0] exp_sum, exact_sum, closed;
    logic        through;
    a = x;
    b = y;
    m = msk;
    #1;
    exp_sum   = model(x, y, msk, through);
    exact_sum = {1'b0, x} + {1'b0, y};
    checks++;
    if (sum_out !== exp_sum) begin
      failures++;
      $display("FAIL a=%h b=%h m=%b: sum_out=%h, expected %h", x, y, msk, sum_out, exp_sum);
    end
    closed = {1'b0, x} + {1'b0, y & ~(x & y & masked_bits(msk))};
    checks++;
    if (sum_out !== closed) begin
      failures++;
      $display("FAIL closed form a=%h b=%h m=%b: sum_out=%h, expected %h", x, y, msk, sum_out, closed);
    end
    if (msk == 3'b111) begin
      checks++;
      if (sum_out !== exact_sum) begin
        failures++;
        $display("FAIL exact a=%h b=%h: sum_out=%h, expected %h", x, y, sum_out, exact_sum);
      end
    end
    for (int k = 0; k < 3; k++) begin
      if (msk[k]) n_exact[k]++;
      else        n_masked[k]++;
    end
    if (sum_out[16]) n_cout++;
    if (through) n_carry_through_mask++;
    if (sum_out != exact_sum) n_approx_error++;
  endtask

  task automatic expect_value(logic [15:0] x, logic [15:0] y, logic [2:0] msk, logic [16:0] want);
    apply(x, y, msk);
    checks++;
    if (sum_out !== want) begin
      failures++;
      $display("FAIL directed a=%h b=%h m=%b: sum_out=%h, expected %h", x, y, msk, sum_out, want);
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
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
    n_masked = '{0, 0, 0};
    n_exact  = '{0, 0, 0};

    // Published example operands, approximate and exact.
    expect_value(16'h6524, 16'h5361, 3'b010, 17'h0B785);
    expect_value(16'h6524, 16'h5361, 3'b111, 17'h0B885);
    // All ones plus one: the carry crosses every group when exact, and no
    // carry is ever born when all low groups are masked.
    expect_value(16'hFFFF, 16'h0001, 3'b111, 17'h10000);
    expect_value(16'hFFFF, 16'h0001, 3'b000, 17'h0FFFF);
    // A carry born in exact group 0 runs through masked groups 1 and 2
    // (p = a | b = 1) and out of the top group.
    expect_value(16'hF0FF, 16'h0F01, 3'b001, 17'h10000);
    // The same carry stopped at bit 4, where a | b = 0 in masked group 1.
    expect_value(16'hFF0F, 16'h0001, 3'b001, 17'h0FF10);

    for (int n = 0; n < 20000; n++) begin
      apply(16'($urandom), 16'($urandom), 3'(n % 8));
    end

    $display("mechanisms exercised:");
    for (int k = 0; k < 3; k++) begin
      need($sformatf("group %0d masked", k), n_masked[k]);
      need($sformatf("group %0d exact", k), n_exact[k]);
    end
    need("carry out of bit 15", n_cout);
    need("carry through masked group", n_carry_through_mask);
    need("approximate result differs", n_approx_error);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
