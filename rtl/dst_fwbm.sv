// dst_fwbm: fixed-width radix-4 Booth multiplier with data scaling (DST-FWBM).
//
// Multiplies two L-bit two's complement numbers and returns only the upper L
// bits of the 2L-bit product, Pq ~ X*Y / 2^L, with the dropped low half
// estimated rather than computed. Data scaling improves that estimate: when
// the multiplicand has redundant sign bits (it is small), it is shifted left
// by up to DSB bits before the multiplication and the product is shifted back
// afterwards, so the core's truncation error is divided by 2^sh in the result.
//
//   x --> ds_in_scaler --xd--> fwbm_core --pd--> ds_out_scaler --> pq
//               |sh_______________^________________^
//
// The default DSB = 1 (one scaling bit) gives one row of L two-input
// multiplexers in front of the core and a row of L-1 behind it; larger DSB
// uses (DSB+1)-input multiplexers. Interface: x (multiplicand), y
// (multiplier), pq (fixed-width product), sh (scaling shift used; with
// DSB = 1, 1 when x_(L-1) == x_(L-2)). Purely combinational, no clock; the
// result is valid one combinational delay after the inputs. The architecture follows the
// reference design; the compensation inside fwbm_core and the scaling select
// rule are this design's choices (see those modules).
module dst_fwbm #(
  parameter int unsigned L   = 8,
  parameter int unsigned DSB = 1,   // scaling bits (DSb); 0 disables scaling
  localparam int unsigned SW = (DSB > 0) ? $clog2(DSB + 1) : 1
) (
  input  logic [L-1:0]  x,
  input  logic [L-1:0]  y,
  output logic [L-1:0]  pq,
  output logic [SW-1:0] sh
);
  logic [L-1:0] xd, pd;

  ds_in_scaler #(.L(L), .DSB(DSB)) u_ds_in (
    .x (x),
    .xd(xd),
    .sh(sh)
  );

  fwbm_core #(.L(L), .DSB(DSB)) u_core (
    .x (xd),
    .y (y),
    .sh(sh),
    .pd(pd)
  );

  ds_out_scaler #(.L(L), .DSB(DSB)) u_ds_out (
    .pd(pd),
    .sh(sh),
    .pq(pq)
  );
endmodule
