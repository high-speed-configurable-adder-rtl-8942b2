// tb_sum_stage: self-check of the sum stage at 16 bits.
// Random propagate, carry and carry-out values; each output bit is
// recomputed one bit at a time.
module tb_sum_stage;
  logic [15:0] p, cg;
  logic        cout;
  logic [16:0] sum_out;
  int checks = 0, failures = 0;

  sum_stage #(.WIDTH(16)) dut (.p(p), .cg(cg), .cout(cout), .sum_out(sum_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] exp_sum;
    for (int n = 0; n < 2000; n++) begin
      p    = 16'($urandom);
      cg   = 16'($urandom);
      cout = 1'($urandom);
      #1;
      for (int i = 0; i < 16; i++) exp_sum[i] = (p[i] != cg[i]);
      exp_sum[16] = cout;
      checks++;
      if (sum_out !== exp_sum) begin
        failures++;
        $display("FAIL p=%h cg=%h cout=%b: sum=%h, expected %h", p, cg, cout, sum_out, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
