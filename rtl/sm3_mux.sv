// Simplified operand multiplexer (SM3) of the carry-save Montgomery loop.
//
// Chooses the third carry-save input x of one iteration from the selection
// pair (A^, q^):  00 -> 0,  01 -> N,  10 -> B,  11 -> D = B + N.
// Because one of the four inputs is the constant 0, the 4:1 multiplexer
// reduces to an AND-OR of three terms per bit, which is how it is written
// here.  The selection table follows the multiplier algorithm; the gate
// form beyond "one input is zero" is this design's.  Combinational.
module sm3_mux #(
  parameter int unsigned W = 18
) (
  input  logic         a_sel,  // A^ : multiplier bit of the iteration
  input  logic         q_sel,  // q^ : quotient bit of the iteration
  input  logic [W-1:0] n,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] x
);

  always_comb begin
    x = ({W{~a_sel &  q_sel}} & n)
      | ({W{ a_sel & ~q_sel}} & b)
      | ({W{ a_sel &  q_sel}} & d);
  end

endmodule
