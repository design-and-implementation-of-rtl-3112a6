// Shared types of the carry-save Montgomery multiplier.
//
// mm_state_e names the four phases of one multiplication: idle, the
// precomputation of D = B + N, the carry-save main loop and the conversion
// of the carry-save result to plain binary.  xsel_e encodes the operand that
// the loop adds in one iteration, selected by the pair (A_i, q_i); the
// encoding {A_i, q_i} is this design's choice.
package mmm_pkg;

  typedef enum logic [1:0] {
    MM_IDLE = 2'd0,   // waiting for start
    MM_PRE  = 2'd1,   // D = B + N by repeated half-adder carry-save steps
    MM_LOOP = 2'd2,   // k+2 radix-2 iterations, some of them skipped
    MM_POST = 2'd3    // SS + SC to binary by repeated half-adder steps
  } mm_state_e;

  // Operand select code {A_i, q_i}
  typedef enum logic [1:0] {
    X_ZERO = 2'b00,
    X_N    = 2'b01,
    X_B    = 2'b10,
    X_D    = 2'b11
  } xsel_e;

endpackage
