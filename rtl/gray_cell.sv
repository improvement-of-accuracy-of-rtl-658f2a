// gray_cell: gray operator of a parallel-prefix carry tree.
//
// Same generate equation as the black operator, go = gi | (pi & gj), but no
// propagate output: it is placed where the combined group already reaches bit 0,
// so go is the final carry into the next bit. Purely combinational.
module gray_cell (
  input  logic gi,
  input  logic pi,
  input  logic gj,
  output logic go
);
  assign go = gi | (pi & gj);
endmodule
