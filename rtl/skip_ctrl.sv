// Look-ahead quotient and skip logic of the carry-save Montgomery loop.
//
// Works in iteration i on the freshly halved carry-save pair
// (SS[i+1], SC[i+1]).  It forms
//   q_{i+1}   = SS[i+1]_0 ^ SC[i+1]_0 ^ (A_{i+1} & B_0)
//   skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0)
// When skip_{i+1} is 1, iteration i+1 would add x = 0 to a pair whose two
// low bits are both 0, so it is only a halving: the caller shifts the pair
// by one more place and goes on with iteration i+2.  For that case the
// block also forms the quotient bit of iteration i+2 from bit 1 of the pair,
//   q_{i+2}   = SS[i+1]_1 ^ SC[i+1]_1 ^ (A_{i+2} & B_0),
// and hands the caller the select pair for the next clock cycle:
//   (q^, A^) = skip ? (q_{i+2}, A_{i+2}) : (q_{i+1}, A_{i+1}).
// allow_skip = 0 (iteration i+1 does not exist) forces skip to 0.
//
// Combinational.  The equations are those of the multiplier description;
// the allow_skip gate at the end of the loop is this design's addition.
module skip_ctrl (
  input  logic allow_skip,
  input  logic ss0,  // SS[i+1] bit 0
  input  logic ss1,  // SS[i+1] bit 1
  input  logic sc0,  // SC[i+1] bit 0
  input  logic sc1,  // SC[i+1] bit 1
  input  logic a1,   // A_{i+1}
  input  logic a2,   // A_{i+2}
  input  logic b0,   // B_0
  output logic skip,
  output logic q_hat,
  output logic a_hat
);

  logic q1, q2;

  q_l u_q1 (.ss0(ss0), .sc0(sc0), .a_i(a1), .b0(b0), .q(q1));
  q_l u_q2 (.ss0(ss1), .sc0(sc1), .a_i(a2), .b0(b0), .q(q2));

  always_comb begin
    skip  = allow_skip & ~(a1 | q1 | ss0);
    q_hat = skip ? q2 : q1;
    a_hat = skip ? a2 : a1;
  end

endmodule
