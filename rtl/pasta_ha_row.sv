// One row of W half adders: the step of the parallel self-timed adder (PASTA)
// recursion.
//
// For every bit position i the row forms sum_i = a_i XOR b_i and
// carry_i = a_i AND b_i.  carry_i has weight 2^(i+1): the caller shifts the
// carry vector by one place before it feeds it back, so that
// a + b == sum + 2*carry always holds.  Used with the operands in the first
// step (equation (1) of the PASTA formulation) and with (sum, carry << 1)
// in every later step (equations (2) and (3)).
//
// Purely combinational.  The half-adder row follows the PASTA description;
// exposing it as a separate module is this design's structuring.
module pasta_ha_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
