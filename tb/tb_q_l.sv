// Self-checking testbench of q_l: all 16 input combinations; q must make
// SS_0 + SC_0 + A_i*B_0 + q even.
module tb_q_l;
  logic ss0, sc0, a_i, b0, q;
  int checks = 0, failures = 0;

  q_l dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {ss0, sc0, a_i, b0} = 4'(v); #1;
      checks++;
      if ((int'(ss0) + int'(sc0) + int'(a_i) * int'(b0) + int'(q)) % 2 != 0) begin
        failures++; $display("FAIL v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
