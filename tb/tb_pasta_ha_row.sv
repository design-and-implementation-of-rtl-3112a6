// Self-checking testbench of pasta_ha_row: random and corner vectors; each
// bit of sum must be the parity and each bit of carry the AND of the two
// input bits, and the identity a + b == sum + 2*carry must hold.
module tb_pasta_ha_row;
  localparam int W = 16;
  logic [W-1:0] a, b, sum, carry;
  int checks = 0, failures = 0;

  pasta_ha_row #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = W'($urandom); b = W'($urandom);
      if (t == 0) begin a = '1; b = '1; end
      if (t == 1) begin a = '0; b = '1; end
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (sum[i] !== ((a[i] + b[i]) % 2 == 1) || carry[i] !== (a[i] + b[i] == 2)) failures++;
      end
      checks++;
      if (int'(a) + int'(b) != int'(sum) + 2 * int'(carry)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
