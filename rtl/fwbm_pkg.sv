// fwbm_pkg: types shared by the Booth encoder, the partial-product rows and the
// fixed-width multiplier core.
//
// booth_code_t carries the radix-4 Booth digit E_i of one multiplier group in
// one-hot magnitude form: `one` when |E_i| = 1, `two` when |E_i| = 2, `neg`
// when E_i < 0, and the nonzero code `nz` (E_i != 0), which the fixed-width core
// also uses to estimate the dropped low part of the partial-product array.
package fwbm_pkg;

  typedef struct packed {
    logic neg;  // digit is negative: row is inverted, +1 added in the row's LSB column
    logic one;  // |E| = 1: select X
    logic two;  // |E| = 2: select 2X
    logic nz;   // nonzero code: E != 0
  } booth_code_t;

endpackage
