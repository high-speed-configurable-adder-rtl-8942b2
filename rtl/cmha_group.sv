// cmha_group: a group of N carry-maskable half adders with one shared mask.
//
// Instead of one mask bit per bit position, the adder masks carry
// propagation a whole group at a time: all N cells of the group see the same
// m_x. With m_x = 1 the group delivers p = a ^ b and g = a & b; with m_x = 0
// it delivers p = a | b and g = 0. The group size of 4 is the published one.
//
// Interface: m_x, a[N-1:0], b[N-1:0] -> p[N-1:0], g[N-1:0].
// Timing: purely combinational.
module cmha_group #(
  parameter int unsigned N = cma_pkg::CMA_GROUP
) (
  input  logic         m_x,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,
  output logic [N-1:0] g
);
  for (genvar i = 0; i < N; i++) begin : g_cell
    cmha u_cmha (
      .m_x(m_x),
      .a  (a[i]),
      .b  (b[i]),
      .p  (p[i]),
      .g  (g[i])
    );
  end
endmodule
