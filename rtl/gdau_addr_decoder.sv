// gdau_addr_decoder -- group address decoder of the GDAU.
//
// The M = (N-1)/2 bits taken from the M DA words in one cycle form a vector
// xj. Vectors that are rotations of each other share one group ROM row. The
// decoder returns the group's seed (its smallest rotation), the group's ROM
// address and the rotating factor r, the smallest r for which the seed
// rotated left by r equals xj. For N = 7 this is the published table:
//   001 010 100 -> seed 001, group 0, rotation 0 1 2
//   011 110 101 -> seed 011, group 1, rotation 0 1 2
//   000         -> seed 000, group 2
//   111         -> seed 111, group 3
// For other N the same rule is applied; the table (2^M entries) is computed
// at elaboration by the functions of gda_pkg. Combinational lookup.
module gdau_addr_decoder
  import gda_pkg::*;
#(
  parameter  int N  = 7,
  localparam int M  = (N - 1) / 2,
  localparam int GN = num_groups(M),
  localparam int GW = (GN > 1) ? $clog2(GN) : 1,
  localparam int RW = (M > 1) ? $clog2(M) : 1
) (
  input  logic [M-1:0]  xj,
  output logic [M-1:0]  seed,
  output logic [GW-1:0] grp,
  output logic [RW-1:0] rot
);

  typedef logic [M+GW+RW-1:0] entry_t;
  typedef entry_t table_t [2**M];

  function automatic table_t build_table();
    table_t tab;
    for (int v = 0; v < 2**M; v++)
      tab[v] = {M'(seed_of(v, M)), GW'(group_of(v, M)), RW'(rot_of(v, M))};
    return tab;
  endfunction

  localparam table_t TABLE = build_table();

  assign {seed, grp, rot} = TABLE[xj];

endmodule
