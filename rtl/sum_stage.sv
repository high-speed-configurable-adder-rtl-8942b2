// sum_stage: sum generation of the configurable adder (Part 3).
//
// One 2-input XOR per bit combines the propagate bit with the carry into that
// bit. The carry out of the top bit becomes the extra most significant bit of
// the result, so a WIDTH-bit add gives a WIDTH+1-bit sum (17 bits by default).
//
// Interface: p, cg [WIDTH-1:0], cout -> sum_out [WIDTH:0]; sum_out[WIDTH] is
// cout passed through unchanged.
// Timing: purely combinational.
module sum_stage #(
  parameter int unsigned WIDTH = cma_pkg::CMA_WIDTH
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] cg,
  input  logic             cout,
  output logic [WIDTH:0]   sum_out
);
  assign sum_out = {cout, p ^ cg};
endmodule
