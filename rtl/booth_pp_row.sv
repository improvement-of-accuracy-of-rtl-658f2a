// booth_pp_row: one radix-4 Booth partial-product row.
//
// Forms the L+1 bits of E_i * X for the digit in `code`: bit j selects x_j
// (|E| = 1) or x_(j-1) (|E| = 2) from the sign-extended multiplicand, and is
// inverted when the digit is negative (one's complement; the +1 that completes
// the negation is added separately at the row's LSB column). A zero digit gives
// all-zero bits. The row MSB (its sign) is then inverted: with the fixed
// constant -2^L * sum(4^i) added once to the whole array, this replaces the
// sign extension of every row. Row bit j has weight 2^(2i+j) in the array.
// Purely combinational. The inverted-MSB sign handling is the usual textbook
// method, chosen here instead of repeating the sign bits.
module booth_pp_row
  import fwbm_pkg::*;
#(
  parameter int unsigned L = 8
) (
  input  logic [L-1:0] x,
  input  booth_code_t  code,
  output logic [L:0]   row
);
  logic [L:0] xe;   // X sign-extended to L+1 bits
  logic [L:0] x2;   // 2X in L+1 bits
  logic [L:0] mag;

  assign xe  = {x[L-1], x};
  assign x2  = {x, 1'b0};
  assign mag = ({(L+1){code.one}} & xe) | ({(L+1){code.two}} & x2);

  always_comb begin
    row    = mag ^ {(L+1){code.neg}};
    row[L] = ~row[L];
  end
endmodule
