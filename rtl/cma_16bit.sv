// cma_16bit: 16-bit accuracy-configurable adder built on carry look-ahead.
//
// The adder trades accuracy for speed and power at run time by masking carry
// generation a group at a time. It is three stages of combinational logic:
//   Part 1  pg_stage    - carry-maskable half adders make p and g; groups
//                         0..2 are switched by m[0..2], the top group is
//                         always exact.
//   Part 2  carry_stage - four 4-bit look-ahead units, chained unit to unit,
//                         make the carry into every bit.
//   Part 3  sum_stage   - sum = p XOR carry, with the last carry on top.
// With m = 3'b111 the result is the exact a + b. With m[k] = 0, group k
// (bits 4k+3 .. 4k) adds as a OR b plus any carry arriving from below and
// starts no carry of its own, which cuts the long carry paths.
//
// Interface: a, b [15:0]; m [2:0] (1 = exact, 0 = masked, one bit per low
// group); sum_out [16:0] with the carry out in bit 16. The port names and
// widths are the published ones. Timing: purely combinational, no clock or
// reset; the result is valid one combinational delay after the inputs.
module cma_16bit #(
  parameter int unsigned WIDTH = cma_pkg::CMA_WIDTH,
  parameter int unsigned GROUP = cma_pkg::CMA_GROUP
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic [WIDTH/GROUP-2:0] m,
  output logic [WIDTH:0]         sum_out
);
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] g;
  logic [WIDTH-1:0] cg;
  logic             cout;

  pg_stage #(.WIDTH(WIDTH), .GROUP(GROUP)) u_part1 (
    .a(a),
    .b(b),
    .m(m),
    .p(p),
    .g(g)
  );

  carry_stage #(.WIDTH(WIDTH), .GROUP(GROUP)) u_part2 (
    .p   (p),
    .g   (g),
    .cg  (cg),
    .cout(cout)
  );

  sum_stage #(.WIDTH(WIDTH)) u_part3 (
    .p      (p),
    .cg     (cg),
    .cout   (cout),
    .sum_out(sum_out)
  );
endmodule
