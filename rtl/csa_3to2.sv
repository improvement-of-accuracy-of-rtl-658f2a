// csa_3to2: one word-level carry-save adder (a row of full adders).
//
// Reduces three W-bit rows to a sum row and a carry row with
// a + b + c == sum + carry (mod 2^W). The carry row is the majority of the
// three inputs shifted up one column; the carry out of the top column is
// dropped, which is correct for arithmetic modulo 2^W. Purely combinational.
module csa_3to2 #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;
  assign sum   = a ^ b ^ c;
  assign maj   = (a & b) | (a & c) | (b & c);
  assign carry = {maj[W-2:0], 1'b0};
endmodule
