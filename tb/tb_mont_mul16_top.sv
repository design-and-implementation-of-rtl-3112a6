// End-to-end testbench of mont_mul16_top with every parameter at its
// default (K = 16).
//
// 1. Single Montgomery products on random and corner operands, each checked
//    as S * 2^18 == A * B (mod N) with S < 2N, while the PASTA adder runs
//    additions at the same time (each checked as a + b).
// 2. Modular exponentiation x^e mod N done entirely with the multiplier:
//    operands go into the Montgomery domain (x * 2^18 mod N, worked out
//    here), products are chained without any final subtraction (each result
//    is fed back as the next operand), and a last product with 1 leaves the
//    domain.  The result is compared with x^e mod N by plain square and
//    multiply on integers.
// It counts how often each mechanism of the design happened: loop
// iterations performed and skipped, a skip of the last iteration, each of
// the four operand selections 0 / N / B / D, two-step carry-save cycles of
// the D = B + N precomputation and of the format conversion, a conversion
// that needed no step, a start ignored while busy, and PASTA additions with
// no carry step and with the longest carry chain.  A mechanism that never
// happened counts as a failure.
module tb_mont_mul16_top;
  import mmm_pkg::*;

  localparam int K = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         mm_start, mm_busy, mm_done;
  logic [K:0]   mm_a, mm_b;
  logic [K-1:0] mm_n;
  logic [K+1:0] mm_s;
  logic         add_start, add_busy, add_done;
  logic [K-1:0] add_a, add_b;
  logic [K:0]   add_sum;
  logic [$clog2(K+2)-1:0] add_steps;

  int checks = 0, failures = 0;
  int n_iter = 0, n_skip = 0, n_skip_last = 0, n_pre = 0, n_post = 0;
  int n_post_none = 0, n_ignored = 0, n_add0 = 0, n_addmax = 0;
  int n_sel[4] = '{0, 0, 0, 0};
  int post_cycles;

  mont_mul16_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled from inside the multiplier.
  always @(posedge clk) if (rst_n) begin
    case (dut.u_mm.state)
      MM_PRE: if (!dut.u_mm.sc_zero) n_pre++;
      MM_LOOP: begin
        n_iter++;
        n_sel[{dut.u_mm.a_hat_q, dut.u_mm.q_hat_q}]++;
        if (dut.u_mm.skip) begin
          n_skip++;
          if (32'(dut.u_mm.i_q) == K) n_skip_last++;
        end
      end
      MM_POST: begin
        post_cycles++;
        if (!dut.u_mm.sc_zero) n_post++;
        else if (post_cycles == 1) n_post_none++;
      end
      default: post_cycles = 0;
    endcase
  end

  task automatic mont(input longint unsigned av, input longint unsigned bv,
                      input longint unsigned nv, output longint unsigned sv);
    int cyc = 0;
    @(negedge clk);
    mm_a = (K+1)'(av); mm_b = (K+1)'(bv); mm_n = K'(nv); mm_start = 1'b1;
    @(negedge clk);
    mm_start = 1'b1; mm_a = '0;             // ignored: the unit is busy
    if (mm_busy) n_ignored++;
    @(negedge clk);
    mm_start = 1'b0;
    while (!mm_done && cyc < 200) begin @(negedge clk); cyc++; end
    sv = longint'(mm_s);
    checks++;
    if (((sv << (K + 2)) % nv) != ((av * bv) % nv) || sv >= 2 * nv) begin
      failures++;
      $display("FAIL mont A=%0d B=%0d N=%0d S=%0d", av, bv, nv, sv);
    end
  endtask

  // PASTA additions in parallel with the multiplier.
  initial begin
    int unsigned av, bv;
    add_start = 1'b0; add_a = '0; add_b = '0;
    wait (rst_n);
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      av = $urandom % 65536; bv = $urandom % 65536;
      if (t % 50 == 0) begin av = 16'hFFFF; bv = 1; end
      if (t % 50 == 1) begin av = 16'hF0F0; bv = 16'h0F0F; end
      add_a = K'(av); add_b = K'(bv); add_start = 1'b1;
      @(negedge clk);
      add_start = 1'b0;
      while (!add_done) @(negedge clk);
      checks++;
      if (int'(add_sum) != int'(av + bv)) begin failures++; $display("FAIL add"); end
      if (add_steps == 0) n_add0++;
      if (int'(add_steps) == K) n_addmax++;
    end
  end

  function automatic longint unsigned modexp(longint unsigned x, longint unsigned e,
                                             longint unsigned nv);
    longint unsigned r = 1 % nv;
    x = x % nv;
    while (e != 0) begin
      if (e[0]) r = (r * x) % nv;
      x = (x * x) % nv;
      e >>= 1;
    end
    return r;
  endfunction

  initial begin
    longint unsigned nv, av, bv, sv, xv, ev, xm, acc, res;
    rst_n = 1'b0; mm_start = 1'b0; mm_a = '0; mm_b = '0; mm_n = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. single products
    mont(0, 0, 65535, sv);
    mont(131069, 131069, 65535, sv);
    mont(65536, 1, 65521, sv);
    for (int t = 0; t < 150; t++) begin
      nv = (longint'($urandom) % 32768) * 2 + 1;
      av = longint'($urandom) % (2 * nv);
      bv = longint'($urandom) % (2 * nv);
      if (t % 4 == 0) av = av & 64'h1_0101;  // sparse multiplier: many skips
      mont(av, bv, nv, sv);
    end

    // 2. modular exponentiation by chained Montgomery products
    for (int t = 0; t < 6; t++) begin
      nv = (t == 0) ? 65521 : (longint'($urandom) % 32768) * 2 + 1;
      xv = longint'($urandom) % nv;
      ev = longint'($urandom) % 65536;
      xm  = (xv << (K + 2)) % nv;               // x in the Montgomery domain
      acc = (longint'(1) << (K + 2)) % nv;      // 1 in the Montgomery domain
      for (int bi = 15; bi >= 0; bi--) begin
        mont(acc, acc, nv, acc);
        if (ev[bi]) mont(acc, xm, nv, acc);
      end
      mont(acc, 1, nv, res);                    // leave the domain
      checks++;
      if (res % nv != modexp(xv, ev, nv)) begin
        failures++;
        $display("FAIL modexp x=%0d e=%0d N=%0d got %0d want %0d", xv, ev, nv,
                 res % nv, modexp(xv, ev, nv));
      end
    end

    wait (!add_busy);
    repeat (5) @(negedge clk);
    $display("iterations %0d skipped %0d (last %0d)  sel 0/N/B/D %0d/%0d/%0d/%0d",
             n_iter, n_skip, n_skip_last, n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    $display("pre steps %0d post steps %0d post-none %0d ignored starts %0d add0 %0d addmax %0d",
             n_pre, n_post, n_post_none, n_ignored, n_add0, n_addmax);
    foreach (n_sel[i]) begin checks++; if (n_sel[i] == 0) failures++; end
    checks++; if (n_iter == 0)      failures++;
    checks++; if (n_skip == 0)      failures++;
    checks++; if (n_skip_last == 0) failures++;
    checks++; if (n_pre == 0)       failures++;
    checks++; if (n_post == 0)      failures++;
    checks++; if (n_post_none == 0) failures++;
    checks++; if (n_ignored == 0)   failures++;
    checks++; if (n_add0 == 0)      failures++;
    checks++; if (n_addmax == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
