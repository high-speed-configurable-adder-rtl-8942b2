// pg_stage: propagate/generate stage of the configurable adder (Part 1).
//
// The operands are cut into WIDTH/GROUP groups of GROUP bits, each built from
// a cmha_group. Group k (k below the top group) takes mask bit m[k]; the most
// significant group has no mask and is tied to exact operation, so the upper
// bits of the sum can always be trusted. With the defaults this is four groups
// (bits 3-0, 7-4, 11-8, 15-12) and a 3-bit mask, as published.
//
// Interface: a, b [WIDTH-1:0], m [WIDTH/GROUP-2:0] -> p, g [WIDTH-1:0].
// Timing: purely combinational.
module pg_stage #(
  parameter int unsigned WIDTH = cma_pkg::CMA_WIDTH,
  parameter int unsigned GROUP = cma_pkg::CMA_GROUP
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic [WIDTH/GROUP-2:0] m,
  output logic [WIDTH-1:0]       p,
  output logic [WIDTH-1:0]       g
);
  localparam int unsigned NG = WIDTH / GROUP;

  if (WIDTH % GROUP != 0 || NG < 2) begin : g_bad_size
    $error("pg_stage: WIDTH must be a multiple of GROUP with at least two groups");
  end

  // Mask seen by each group: the given bits, then a constant 1 for the top.
  logic [NG-1:0] mask;
  assign mask = {1'b1, m};

  for (genvar k = 0; k < NG; k++) begin : g_group
    cmha_group #(.N(GROUP)) u_group (
      .m_x(mask[k]),
      .a  (a[k*GROUP +: GROUP]),
      .b  (b[k*GROUP +: GROUP]),
      .p  (p[k*GROUP +: GROUP]),
      .g  (g[k*GROUP +: GROUP])
    );
  end
endmodule
