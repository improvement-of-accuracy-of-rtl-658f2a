// ds_out_scaler: undoes the data scaling on the fixed-width product.
//
// pd holds product bits 2L-1..L computed from the multiplicand scaled by 2^sh,
// so the wanted product is pd shifted right arithmetically by sh:
// pq_(2L-1) = pd_(2L-1) always, and every lower bit is a (DSB+1)-input
// multiplexer choosing pd_(i+sh) (sign bit where i+sh runs past the top),
// L-1 multiplexers in all. With the default DSB = 1 this is the two-input row
// (pd_i, pd_(i+1)) of the reference block diagram. Bits are indexed from 0
// (column L) to L-1 (column 2L-1). The rounding needed for the discarded bits
// is already added inside the multiplier core. Purely combinational.
module ds_out_scaler #(
  parameter int unsigned L   = 8,
  parameter int unsigned DSB = 1,
  localparam int unsigned SW = (DSB > 0) ? $clog2(DSB + 1) : 1
) (
  input  logic [L-1:0]  pd,
  input  logic [SW-1:0] sh,
  output logic [L-1:0]  pq
);
  assign pq = L'($signed(pd) >>> sh);
endmodule
