// Quotient-bit logic of the radix-2 Montgomery iteration.
//
// q = (SS_0 + SC_0 + A_i * B_0) mod 2: the bit that, when q*N is added,
// makes SS + SC + A_i*B + q*N even so that the exact halving of the
// iteration is possible.  Three-input XOR with one AND, combinational.
// The formula is the multiplier algorithm's; the gate form is the simplest
// one that computes it.
module q_l (
  input  logic ss0,   // bit 0 of the sum vector
  input  logic sc0,   // bit 0 of the carry vector
  input  logic a_i,   // multiplier bit A_i
  input  logic b0,    // bit 0 of the multiplicand B
  output logic q
);

  always_comb q = ss0 ^ sc0 ^ (a_i & b0);

endmodule
