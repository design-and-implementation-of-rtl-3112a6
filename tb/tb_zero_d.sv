// Self-checking testbench of zero_d: all-zero, every one-hot vector and
// random vectors; zero must be 1 only for the all-zero vector.
module tb_zero_d;
  localparam int W = 18;
  logic [W-1:0] sc;
  logic zero;
  int checks = 0, failures = 0;

  zero_d #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sc = '0; #1;
    checks++; if (zero !== 1'b1) failures++;
    for (int i = 0; i < W; i++) begin
      sc = '0; sc[i] = 1'b1; #1;
      checks++; if (zero !== 1'b0) begin failures++; $display("FAIL bit %0d", i); end
    end
    for (int t = 0; t < 500; t++) begin
      sc = W'($urandom) & W'($urandom); #1;
      checks++; if (zero !== (sc == 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
