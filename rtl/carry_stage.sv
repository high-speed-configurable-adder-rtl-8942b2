// carry_stage: carry network of the configurable adder (Part 2).
//
// WIDTH/GROUP look-ahead units (four 4-bit units by default), one per
// group. Each unit's carry out feeds the next unit's carry in, and the carry
// into unit 0 is 0. Unlike a two-level carry look-ahead adder there is no
// second-level unit combining the group propagate/generate signals: four units
// instead of five, as published. A masked group has g = 0, so it starts no
// carry of its own; a carry from below still passes wherever p = a | b is 1.
//
// Interface: p, g [WIDTH-1:0] -> cg [WIDTH-1:0] (carry into each bit),
// cout (carry out of the top bit). cg[0] is the constant 0 and cg[1] is
// simply g[0]; both follow from the zero carry into the adder.
// Timing: purely combinational.
module carry_stage #(
  parameter int unsigned WIDTH = cma_pkg::CMA_WIDTH,
  parameter int unsigned GROUP = cma_pkg::CMA_GROUP
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] cg,
  output logic             cout
);
  localparam int unsigned NG = WIDTH / GROUP;

  if (WIDTH % GROUP != 0) begin : g_bad_size
    $error("carry_stage: WIDTH must be a multiple of GROUP");
  end

  // chain[k] is the carry into unit k; chain[NG] is the adder's carry out.
  logic [NG:0] chain;
  assign chain[0] = 1'b0;

  for (genvar k = 0; k < NG; k++) begin : g_unit
    cla4_unit #(.N(GROUP)) u_unit (
      .p   (p[k*GROUP +: GROUP]),
      .g   (g[k*GROUP +: GROUP]),
      .cin (chain[k]),
      .cg  (cg[k*GROUP +: GROUP]),
      .cout(chain[k+1])
    );
  end

  assign cout = chain[NG];
endmodule
