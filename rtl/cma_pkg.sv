// cma_pkg: shared sizes of the carry-maskable adder.
//
// The adder is 16 bits wide and is cut into groups of 4 bits; every group
// except the most significant one has its own mask bit. These are the sizes
// of the published design and are the default parameters of every module.
// The number of mask bits follows from them: one per group, minus the
// always-exact top group (3 with the defaults).
package cma_pkg;
  localparam int unsigned CMA_WIDTH = 16;
  localparam int unsigned CMA_GROUP = 4;
endpackage
