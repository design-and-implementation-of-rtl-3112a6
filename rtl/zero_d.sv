// Zero detector for the carry vector of the carry-save datapath.
//
// A single wide NOR: zero is 1 exactly when every bit of sc is 0.  The
// multiplier uses it to end the precomputation of D = B + N and the final
// format conversion, both of which repeat carry-save steps until the carry
// vector has died out.  The NOR structure is the one the multiplier's
// description gives; the width is a parameter.  Combinational.
module zero_d #(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] sc,
  output logic         zero
);

  always_comb zero = ~(|sc);

endmodule
