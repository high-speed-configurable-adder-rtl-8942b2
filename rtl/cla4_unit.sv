// cla4_unit: N-bit carry look-ahead unit (4 bits by default).
//
// From the propagate and generate bits of its N positions and the carry into
// the unit, it forms every carry in two levels of logic rather than by
// rippling: the carry into bit i is
//   c_i = g_{i-1} | p_{i-1} g_{i-2} | ... | p_{i-1} ... p_1 g_0
//         | p_{i-1} ... p_0 cin,
// and the carry out is the same expression for i = N. The unit's task (carries
// from P, G and a carry in) is published; the sum-of-products form is the
// textbook look-ahead and is this design's choice.
//
// Interface: p, g [N-1:0], cin -> cg [N-1:0] (cg[i] is the carry into bit i,
// so cg[0] = cin), cout (carry out of bit N-1). cg[0] is the carry in
// passed straight through; it is an output so that every bit's carry comes
// from one bus.
// Timing: purely combinational.
module cla4_unit #(
  parameter int unsigned N = cma_pkg::CMA_GROUP
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] g,
  input  logic         cin,
  output logic [N-1:0] cg,
  output logic         cout
);
  // c[i] is the carry into position i; c[N] is the carry out.
  logic [N:0] c;

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      logic prod;
      // Carry in, propagated through every position below i.
      prod = cin;
      for (int j = 0; j < i; j++) prod = prod & p[j];
      c[i] = prod;
      // Carry generated at position j, propagated through j+1 .. i-1.
      for (int j = 0; j < i; j++) begin
        prod = g[j];
        for (int k = j + 1; k < i; k++) prod = prod & p[k];
        c[i] = c[i] | prod;
      end
    end
  end

  assign cg   = c[N-1:0];
  assign cout = c[N];
endmodule
