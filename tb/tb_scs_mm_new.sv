// Self-checking testbench of scs_mm_new at K = 16.
//
// Runs corner cases and random operands (odd N < 2^K, A, B < 2N).  Each
// result is checked arithmetically, independently of the datapath:
// S * 2^(K+2) == A * B (mod N) and S < 2N.  The cycle count from start to
// done is checked against a bit-level software model of the algorithm
// (precomputation steps P, loop cycles L with skipping, conversion steps C:
// 1 + (P+1) + L + (C+1)), and L is checked against its bounds
// ceil((K+2)/2) <= L <= K+2.  Also checks that done is a single-cycle pulse
// and that a start while busy is ignored.
module tb_scs_mm_new;

  localparam int K = 16;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic [K:0]   a, b;
  logic [K-1:0] n;
  logic         busy, done;
  logic [K+1:0] s;

  int checks = 0;
  int failures = 0;
  int total_skips = 0;

  scs_mm_new #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void two_half_steps(ref longint unsigned ss, ref longint unsigned sc);
    longint unsigned s1, c1;
    s1 = ss ^ sc;
    c1 = (ss & sc) << 1;
    ss = s1 ^ c1;
    sc = (s1 & c1) << 1;
  endfunction

  // Bit-level model of the cycle count; returns cycles from start to done.
  function automatic int model_cycles(longint unsigned av, longint unsigned bv,
                                      longint unsigned nv, output int skips);
    longint unsigned ss, sc, d, x, sm, cr, ns, nc;
    int p, l, c, i;
    bit qh, ah, q1, q2, sk;
    p = 0; l = 0; c = 0; skips = 0;
    ss = bv; sc = nv;
    while (sc != 0) begin two_half_steps(ss, sc); p++; end
    d = ss;
    ss = 0; sc = 0; i = 0;
    ah = av[0]; qh = av[0] & bv[0];
    while (i <= K + 1) begin
      x  = ah ? (qh ? d : bv) : (qh ? nv : 0);
      sm = ss ^ sc ^ x;
      cr = (ss & sc) | (ss & x) | (sc & x);
      ns = sm >> 1; nc = cr;
      q1 = ns[0] ^ nc[0] ^ (av[i+1] & bv[0]);
      q2 = ns[1] ^ nc[1] ^ (av[i+2] & bv[0]);
      sk = (i < K + 1) && !(av[i+1] || q1 || ns[0]);
      l++;
      if (sk) begin
        ss = ns >> 1; sc = nc >> 1; i += 2; ah = av[i]; qh = q2; skips++;
      end else begin
        ss = ns; sc = nc; i += 1; ah = av[i]; qh = q1;
      end
    end
    while (sc != 0) begin two_half_steps(ss, sc); c++; end
    return 1 + (p + 1) + l + (c + 1);
  endfunction

  task automatic run_one(input longint unsigned av, input longint unsigned bv,
                         input longint unsigned nv);
    int cyc, exp_cyc, skips, lmin;
    longint unsigned sv;
    @(negedge clk);
    a = (K+1)'(av); b = (K+1)'(bv); n = K'(nv);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    // a start during the operation must be ignored
    a = '1; b = '1; n = '1; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc++;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 200) break;
    end
    sv = longint'(s);
    exp_cyc = model_cycles(av, bv, nv, skips);
    total_skips += skips;
    checks++;
    if (((sv << (K + 2)) % nv) != ((av * bv) % nv) || sv >= 2 * nv) begin
      failures++;
      $display("FAIL result A=%0d B=%0d N=%0d S=%0d", av, bv, nv, sv);
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL cycles A=%0d B=%0d N=%0d got %0d expected %0d", av, bv, nv, cyc, exp_cyc);
    end
    // the loop can never be shorter than half of K+2 nor longer than K+2
    lmin = (K + 3) / 2;
    checks++;
    if (skips > (K + 2) - lmin) begin
      failures++;
      $display("FAIL skip count %0d", skips);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done is not a single pulse / busy after done");
    end
  endtask

  initial begin
    longint unsigned nv, av, bv;
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0; n = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // corners
    run_one(0, 0, 65535);
    run_one(131069, 131069, 65535);
    run_one(1, 1, 3);
    run_one(5, 4, 3);
    run_one(0, 1, 1);
    run_one(1, 0, 65521);
    run_one(65535, 2, 65521);
    run_one(131041, 131041, 65521);
    run_one(1 << 16, 1 << 16, 65535);
    run_one(1, 131069, 65535);
    for (int t = 0; t < 400; t++) begin
      case (t % 3)
        0: nv = (longint'($urandom) % 32768) * 2 + 1;
        1: nv = 65535 - 2 * (longint'($urandom) % 64);
        default: nv = (longint'($urandom) % 128) * 2 + 1;
      endcase
      av = longint'($urandom) % (2 * nv);
      bv = longint'($urandom) % (2 * nv);
      if (t % 7 == 0) av = av & ~longint'(32'h0000_5A5A);  // sparse A: more skips
      run_one(av, bv, nv);
    end
    checks++;
    if (total_skips == 0) begin
      failures++;
      $display("FAIL no iteration was ever skipped");
    end
    $display("skipped iterations in total: %0d", total_skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
