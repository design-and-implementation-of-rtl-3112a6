// Self-checking testbench of ccsa.
// Three-input mode: sum must be the bitwise parity and carry the bitwise
// majority of ss, sc, x, and ss + sc + x == sum + 2*carry.
// Two-step mode: the result must equal two successive half-adder steps
// worked out here on integers, and ss + sc == sum + 2*carry.
module tb_ccsa;
  localparam int W = 18;
  logic mode_2h;
  logic [W-1:0] ss, sc, x, sum, carry;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned s1, c1, s2, c2;
    for (int t = 0; t < 3000; t++) begin
      mode_2h = t[0];
      // keep the top bit clear so that totals fit in W+1 bits
      ss = W'($urandom) >> 1; sc = W'($urandom) >> 1; x = W'($urandom) >> 1;
      if (t < 4) begin ss = {1'b0, {(W-1){1'b1}}}; sc = W'(1); end
      #1;
      if (!mode_2h) begin
        checks++;
        if (sum !== (ss ^ sc ^ x) || carry !== ((ss & sc) | (ss & x) | (sc & x))) failures++;
        checks++;
        if (longint'(ss) + longint'(sc) + longint'(x) != longint'(sum) + 2 * longint'(carry)) failures++;
      end else begin
        s1 = longint'(ss) ^ longint'(sc);
        c1 = (longint'(ss) & longint'(sc)) << 1;
        s2 = s1 ^ c1;
        c2 = s1 & c1;               // unshifted, weight 2^(i+1)
        checks++;
        if (longint'(sum) != s2 || longint'(carry) != c2) begin
          failures++; $display("FAIL 2H ss=%h sc=%h", ss, sc);
        end
        checks++;
        if (longint'(ss) + longint'(sc) != longint'(sum) + 2 * longint'(carry)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
