// ds_in_scaler: data-scaling (DS) stage on the multiplicand.
//
// A two's complement X whose top k+1 bits are all equal carries k redundant
// sign bits: it fits in L-k bits. The stage counts those redundant bits, up to
// DSB of them, and shifts X left by that amount, sh, so the fixed-width
// multiplier sees sh more significant bits of the operand:
//   xd = X * 2^sh,   sh = min(DSB, number of redundant sign bits).
// Each xd bit is a (DSB+1)-input multiplexer over x_i, x_(i-1), ..., x_(i-DSB)
// (zero below x_0), L multiplexers in all; with the default DSB = 1 they are
// the two-input row (x_i, x_(i-1)) of the reference block diagram and sh is the
// single select bit, 1 exactly when x_(L-1) == x_(L-2). sh drives the
// multiplier core (rounding position) and ds_out_scaler (shift back).
// Purely combinational. Counting redundant bits as the select rule is this
// design's reading of "removing superfluous bits of the multiplicand".
module ds_in_scaler #(
  parameter int unsigned L   = 8,
  parameter int unsigned DSB = 1,   // maximum scaling, bits (DSb); DSB <= L-2
  localparam int unsigned SW = (DSB > 0) ? $clog2(DSB + 1) : 1
) (
  input  logic [L-1:0]  x,
  output logic [L-1:0]  xd,
  output logic [SW-1:0] sh
);
  if (DSB > L - 2) begin : g_bad_dsb
    $error("ds_in_scaler: DSB must not exceed L-2");
  end

  always_comb begin
    logic run;
    run = 1'b1;
    sh  = '0;
    for (int unsigned k = 1; k <= DSB; k++) begin
      run = run & (x[L-1-k] == x[L-1]);
      if (run) sh = SW'(k);
    end
  end

  assign xd = x << sh;
endmodule
