// booth_encoder: modified radix-4 Booth encoder for one multiplier group.
//
// The multiplier Y is cut into overlapping three-bit groups
// {y(2i+1), y(2i), y(2i-1)} with y(-1) = 0. Each group is one digit
// E_i in {-2, -1, 0, +1, +2}, following the standard recoding table:
//   000 -> 0   001 -> +1   010 -> +1   011 -> +2
//   100 -> -2  101 -> -1   110 -> -1   111 -> 0
// The digit is given as booth_code_t {neg, one, two, nz}. Besides the usual
// select signals the encoder produces the nonzero code nz (E_i != 0), which the
// fixed-width core uses for its truncation compensation. Group 111 gives
// neg = 0 so that a zero digit never asks for a +1. Purely combinational.
module booth_encoder
  import fwbm_pkg::*;
(
  input  logic [2:0]  grp,   // {y(2i+1), y(2i), y(2i-1)}
  output booth_code_t code
);
  logic y_hi, y_mid, y_lo;
  assign {y_hi, y_mid, y_lo} = grp;

  always_comb begin
    code.one = y_mid ^ y_lo;
    code.two = (y_hi & ~y_mid & ~y_lo) | (~y_hi & y_mid & y_lo);
    code.neg = y_hi & ~(y_mid & y_lo);
    code.nz  = (y_mid ^ y_lo) | (y_hi ^ y_mid);
  end
endmodule
