// Self-checking testbench of skip_ctrl: all 256 input combinations.
// Expected values are worked out from what the signals mean: iteration i+1
// is skipped exactly when it may be, A_{i+1} = 0 and both low bits of the
// carry-save pair are 0 (then q_{i+1} = 0 follows); the select pair is that
// of iteration i+2 after a skip, of iteration i+1 otherwise, and its q makes
// the relevant low bits plus A*B_0 even.
module tb_skip_ctrl;
  logic allow_skip, ss0, ss1, sc0, sc1, a1, a2, b0;
  logic skip, q_hat, a_hat;
  int checks = 0, failures = 0;

  skip_ctrl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_skip, e_q, e_a;
    for (int v = 0; v < 256; v++) begin
      {allow_skip, ss0, ss1, sc0, sc1, a1, a2, b0} = 8'(v);
      #1;
      e_skip = allow_skip && !a1 && !ss0 && !sc0;
      if (e_skip) begin
        e_a = a2;
        e_q = ((int'(ss1) + int'(sc1) + int'(a2 & b0)) % 2) == 1;
      end else begin
        e_a = a1;
        e_q = ((int'(ss0) + int'(sc0) + int'(a1 & b0)) % 2) == 1;
      end
      checks++;
      if (skip !== e_skip || q_hat !== e_q || a_hat !== e_a) begin
        failures++; $display("FAIL v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
