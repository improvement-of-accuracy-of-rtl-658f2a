// black_cell: black operator of a parallel-prefix carry tree.
//
// Combines the (generate, propagate) pair of an upper bit group (gi, pi) with
// that of the adjacent lower group (gj, pj):
//   go = gi | (pi & gj)      group generate
//   po = pi & pj             group propagate
// Purely combinational. Used by ksa_adder wherever the combined group does not
// yet reach bit 0, so its propagate is still needed by a later level.
module black_cell (
  input  logic gi,
  input  logic pi,
  input  logic gj,
  input  logic pj,
  output logic go,
  output logic po
);
  assign go = gi | (pi & gj);
  assign po = pi & pj;
endmodule
