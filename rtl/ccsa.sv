// Configurable carry-save adder (CCSA) of the Montgomery datapath.
//
// One row of W bit slices, each a full adder built from two half adders:
//   first half adder  : (s1, c1) = HA(ss, sc)
//   second half adder : (s2, c2) = HA(s1, y)
// In three-input mode (mode_2h = 0) y is the operand x and the slice is an
// ordinary full adder: sum = s2, carry = c1 | c2, so that
//   ss + sc + x == sum + 2*carry.
// In two-step mode (mode_2h = 1) y is the first half adder's carry from the
// bit below (c1 << 1): the row then performs two successive half-adder
// carry-save steps of the PASTA recursion, 2H_CSA(ss, sc), in one pass:
//   ss + sc == sum + 2*carry   (carry = c2).
// The carry output is not shifted: bit i of carry has weight 2^(i+1).
//
// Combinational.  The two modes and their use follow the multiplier
// description; the half-adder composition and the placement of the input
// select in front of the second half adder are this design's reading of it.
// In two-step mode the carry out of the top slice of the first row is
// dropped: callers keep ss + sc below 2^W, which makes it zero.
module ccsa #(
  parameter int unsigned W = 18
) (
  input  logic         mode_2h,  // 1: two half-adder steps, 0: ss + sc + x
  input  logic [W-1:0] ss,
  input  logic [W-1:0] sc,
  input  logic [W-1:0] x,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s1, c1, y, c2;

  pasta_ha_row #(.W(W)) u_ha1 (.a(ss), .b(sc), .sum(s1), .carry(c1));

  always_comb y = mode_2h ? {c1[W-2:0], 1'b0} : x;

  pasta_ha_row #(.W(W)) u_ha2 (.a(s1), .b(y), .sum(sum), .carry(c2));

  always_comb carry = mode_2h ? c2 : (c1 | c2);

endmodule
