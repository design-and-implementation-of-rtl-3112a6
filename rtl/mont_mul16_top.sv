// 16-bit Montgomery modular multiplication unit.
//
// Two side-by-side engines built from the same half-adder rows:
//   u_mm    scs_mm_new  - carry-save radix-2 Montgomery multiplier with
//                         B + N precomputation, iteration skipping and
//                         on-datapath format conversion; computes
//                         mm_s = mm_a * mm_b * 2^-(K+2) mod mm_n, in [0, 2N).
//   u_pasta pasta_adder - the parallel self-timed adder (clocked form) on
//                         which the multiplier's two-step carry-save mode is
//                         based, usable as a plain K-bit adder.
// Each engine has its own start/busy/done handshake; see those modules for
// the timing.  K = 16 is the operand size of the design; placing the
// stand-alone adder next to the multiplier is this design's packaging.
module mont_mul16_top #(
  parameter int unsigned K = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Montgomery multiplier
  input  logic                   mm_start,
  input  logic [K:0]             mm_a,
  input  logic [K:0]             mm_b,
  input  logic [K-1:0]           mm_n,
  output logic                   mm_busy,
  output logic                   mm_done,
  output logic [K+1:0]           mm_s,
  // PASTA adder
  input  logic                   add_start,
  input  logic [K-1:0]           add_a,
  input  logic [K-1:0]           add_b,
  output logic                   add_busy,
  output logic                   add_done,
  output logic [K:0]             add_sum,
  output logic [$clog2(K+2)-1:0] add_steps
);

  scs_mm_new #(.K(K)) u_mm (
    .clk(clk), .rst_n(rst_n), .start(mm_start),
    .a(mm_a), .b(mm_b), .n(mm_n),
    .busy(mm_busy), .done(mm_done), .s(mm_s)
  );

  pasta_adder #(.W(K)) u_pasta (
    .clk(clk), .rst_n(rst_n), .start(add_start),
    .a(add_a), .b(add_b),
    .busy(add_busy), .done(add_done), .sum(add_sum), .steps(add_steps)
  );

endmodule
