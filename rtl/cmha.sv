// cmha: carry-maskable half adder (one bit).
//
// A half adder whose generate output can be switched off. With the mask
// m_x = 1 it is an ordinary half adder: p = a XOR b, g = a AND b. With
// m_x = 0 the generate is forced to 0 and p becomes a OR b, so the bit never
// starts a carry but still lets one pass through when either input is 1.
//
// Both cases are written as one expression, g = m_x & a & b and
// p = (a | b) & ~g, which gives exactly the two behaviours above; the
// behaviour is the published one, the two-expression form is this design's.
//
// Interface: m_x (1 = exact, 0 = carry masked), a, b -> p, g.
// Timing: purely combinational, no clock.
module cmha (
  input  logic m_x,
  input  logic a,
  input  logic b,
  output logic p,
  output logic g
);
  always_comb begin
    g = m_x & a & b;
    p = (a | b) & ~g;
  end
endmodule
