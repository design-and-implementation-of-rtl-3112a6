// Carry-save radix-2 Montgomery modular multiplier with iteration skipping.
//
// Computes S = A * B * 2^-(K+2) mod N for an odd K-bit modulus N and
// operands 0 <= A, B < 2N, with no final subtraction: the result lies in
// [0, 2N) and can be fed straight back as an operand.  Everything runs on
// one configurable carry-save adder row (ccsa) and two vectors SS and SC
// whose sum is the running value:
//
//   MM_PRE   D = B + N.  SS = B, SC = N, then repeat the two-step
//            half-adder carry-save addition 2H_CSA(SS, SC) until SC = 0
//            (zero_d).  Each cycle moves every carry two places.
//   MM_LOOP  iterations i = 0 .. K+1 of
//              (SS, SC) = (SS + SC + x) / 2,  x in {0, N, B, D}
//            with x chosen by (A_i, q_i) through sm3_mux from select bits
//            held in flip-flops.  skip_ctrl already works out, in iteration
//            i, the select bits of the next iteration and whether iteration
//            i+1 is a pure halving (A_{i+1} = q_{i+1} = SS_0 = SC_0 = 0);
//            if so the pair is shifted by two places and iteration i+2
//            follows directly, so the loop takes K+2 minus the number of
//            skipped iterations cycles.
//   MM_POST  format conversion: 2H_CSA(SS, SC) until SC = 0; SS is then S.
//
// The algorithm, the reuse of the carry-save row for B + N and for the
// conversion, the two-step mode, the Zero_D and Q_L circuits, the SM3
// multiplexer and the skip rule follow the multiplier description.  This
// design's own choices: the start/busy/done handshake, the synchronous
// active-low reset, register widths of K+2 bits, the state encoding, taking
// the first iteration always (there is no iteration -1 to skip it from) and
// allowing a skip only while iteration i+1 lies inside the loop.
//
// Interface and timing: start is taken in MM_IDLE (ignored while busy) and
// samples a, b and n.  done pulses for one cycle with s valid; s holds until
// the next result.  From the start edge, done rises after
//   1 + (P + 1) + L + (C + 1) cycles,
// P and C being the two-step counts of precomputation and conversion and L
// the number of loop cycles.  A new start is accepted in the cycle done is
// high.
module scs_mm_new
  import mmm_pkg::*;
#(
  parameter int unsigned K = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   a,      // 0 <= A < 2N
  input  logic [K:0]   b,      // 0 <= B < 2N
  input  logic [K-1:0] n,      // odd modulus
  output logic         busy,
  output logic         done,
  output logic [K+1:0] s       // A*B*2^-(K+2) mod N, 0 <= S < 2N
);

  localparam int unsigned RW = K + 2;             // width of SS, SC, B, N, D
  localparam int unsigned IW = $clog2(K + 4);     // iteration counter
  localparam logic [IW-1:0] LAST = IW'(K + 1);    // index of the last iteration

  mm_state_e     state;
  logic [RW-1:0] ss_q, sc_q, b_q, n_q, d_q;
  logic [K+2:0]  a_q;        // A >> i, with zeros above A's top bit
  logic [IW-1:0] i_q;        // current iteration
  logic          q_hat_q, a_hat_q;

  logic [RW-1:0] x, csa_sum, csa_carry, ns, nc;
  logic          sc_zero, skip, q_hat_nx, a_hat_nx, allow_skip;
  logic [IW:0]   i_next;

  // Datapath ---------------------------------------------------------------
  sm3_mux #(.W(RW)) u_sm3 (
    .a_sel(a_hat_q), .q_sel(q_hat_q), .n(n_q), .b(b_q), .d(d_q), .x(x)
  );

  ccsa #(.W(RW)) u_ccsa (
    .mode_2h(state != MM_LOOP), .ss(ss_q), .sc(sc_q), .x(x),
    .sum(csa_sum), .carry(csa_carry)
  );

  zero_d #(.W(RW)) u_zero_d (.sc(sc_q), .zero(sc_zero));

  // (SS[i+1], SC[i+1]) = (SS[i] + SC[i] + x) / 2: the sum vector moves down
  // one place, the carry vector (weight 2^(j+1)) is already halved.
  always_comb begin
    ns = {1'b0, csa_sum[RW-1:1]};
    nc = csa_carry;
  end

  always_comb allow_skip = (i_q < LAST);

  skip_ctrl u_skip (
    .allow_skip(allow_skip),
    .ss0(ns[0]), .ss1(ns[1]), .sc0(nc[0]), .sc1(nc[1]),
    .a1(a_q[1]), .a2(a_q[2]), .b0(b_q[0]),
    .skip(skip), .q_hat(q_hat_nx), .a_hat(a_hat_nx)
  );

  always_comb i_next = {1'b0, i_q} + (skip ? (IW+1)'(2) : (IW+1)'(1));

  always_comb busy = (state != MM_IDLE);

  // Control and registers -------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= MM_IDLE;
      done    <= 1'b0;
      s       <= '0;
      ss_q    <= '0;
      sc_q    <= '0;
      b_q     <= '0;
      n_q     <= '0;
      d_q     <= '0;
      a_q     <= '0;
      i_q     <= '0;
      q_hat_q <= 1'b0;
      a_hat_q <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        MM_IDLE: begin
          if (start) begin
            b_q   <= RW'(b);
            n_q   <= RW'(n);
            a_q   <= (K+3)'(a);
            ss_q  <= RW'(b);
            sc_q  <= RW'(n);
            state <= MM_PRE;
          end
        end

        MM_PRE: begin
          if (sc_zero) begin
            d_q     <= ss_q;
            ss_q    <= '0;
            sc_q    <= '0;
            i_q     <= '0;
            a_hat_q <= a_q[0];
            q_hat_q <= a_q[0] & b_q[0];   // SS[0] = SC[0] = 0
            state   <= MM_LOOP;
          end else begin
            ss_q <= csa_sum;
            sc_q <= {csa_carry[RW-2:0], 1'b0};
          end
        end

        MM_LOOP: begin
          if (skip) begin
            ss_q <= {1'b0, ns[RW-1:1]};
            sc_q <= {1'b0, nc[RW-1:1]};
            a_q  <= {2'b00, a_q[K+2:2]};
          end else begin
            ss_q <= ns;
            sc_q <= nc;
            a_q  <= {1'b0, a_q[K+2:1]};
          end
          q_hat_q <= q_hat_nx;
          a_hat_q <= a_hat_nx;
          i_q     <= i_next[IW-1:0];
          if (i_next > (IW+1)'(LAST)) state <= MM_POST;
        end

        MM_POST: begin
          if (sc_zero) begin
            s     <= ss_q;
            done  <= 1'b1;
            state <= MM_IDLE;
          end else begin
            ss_q <= csa_sum;
            sc_q <= {csa_carry[RW-2:0], 1'b0};
          end
        end

        default: state <= MM_IDLE;
      endcase
    end
  end

  // Rules of the datapath ---------------------------------------------------
  // x makes SS + SC + x even, so the halving is exact.
  a_even : assert property (@(posedge clk) disable iff (!rst_n)
                            state == MM_LOOP |-> !csa_sum[0]);
  // A skipped iteration only halves: both low bits of the pair are zero.
  a_skip_exact : assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == MM_LOOP && skip) |-> (!ns[0] && !nc[0]));
  // The two-step additions never push a carry out of the register width.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
                                   (state inside {MM_PRE, MM_POST}) |->
                                   !csa_carry[RW-1]);

endmodule
