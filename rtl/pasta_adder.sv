// Parallel self-timed adder (PASTA), clocked form.
//
// Adds two W-bit operands by the half-adder recursion:
//   start     : S^0 = a ^ b,  C^0_{i+1} = a_i & b_i                  (1)
//   step j    : S^j_i = S^{j-1}_i ^ C^{j-1}_i,
//               C^j_{i+1} = S^{j-1}_i & C^{j-1}_i                      (2),(3)
//   finished  : when every carry C^k_1 .. C^k_W is 0                 (4)
// Then S holds a + b.  Every step moves each pending carry at least one
// place up, so at most W steps follow the first (for operands 2^W-1 and 1).
// The recursion, the operand/feedback selection in front of the half-adder
// row and the all-carries-zero termination come from the PASTA description.
// The original adder is self-timed; here one step takes one clock cycle and
// completion is sampled on the clock, which is this design's choice.
//
// Interface and timing: a start pulse (accepted when not busy) loads
// S^0/C^0 on the next edge.  On each later edge the block either steps or,
// if the carries are all zero, raises done for one cycle with sum valid;
// sum then stays until the next start.  steps reports how many recursion
// steps (2)-(3) the addition needed.  Latency from start to done high is
// steps + 2 cycles.  Synchronous active-low reset.
module pasta_adder #(
  parameter int unsigned W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [W-1:0]           a,
  input  logic [W-1:0]           b,
  output logic                   busy,
  output logic                   done,
  output logic [W:0]             sum,
  output logic [$clog2(W+2)-1:0] steps
);

  localparam int unsigned SW = W + 1;  // sum and carry vectors, carry-out included

  logic [SW-1:0] s_q, c_q;             // c_q[i] is the carry into bit i
  logic [SW-1:0] row_a, row_b, row_s, row_c;
  logic          c_zero;

  // Operand select in front of the half-adder row: the operands at start,
  // the fed-back sum and carry afterwards.
  always_comb begin
    if (busy) begin
      row_a = s_q;
      row_b = c_q;
    end else begin
      row_a = {1'b0, a};
      row_b = {1'b0, b};
    end
  end

  pasta_ha_row #(.W(SW)) u_row (.a(row_a), .b(row_b), .sum(row_s), .carry(row_c));

  zero_d #(.W(SW)) u_zero (.sc(c_q), .zero(c_zero));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q   <= '0;
      c_q   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      sum   <= '0;
      steps <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          s_q   <= row_s;
          c_q   <= {row_c[SW-2:0], 1'b0};
          busy  <= 1'b1;
          steps <= '0;
        end
      end else if (c_zero) begin
        sum  <= s_q;
        done <= 1'b1;
        busy <= 1'b0;
      end else begin
        s_q   <= row_s;
        c_q   <= {row_c[SW-2:0], 1'b0};
        steps <= steps + 1'b1;
      end
    end
  end

  // A carry never leaves the top bit: the total fits in W+1 bits.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> !row_c[SW-1]);

endmodule
