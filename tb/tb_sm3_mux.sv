// Self-checking testbench of sm3_mux: random N, B, D under each of the four
// select codes; x must be 0, N, B or D as (A^, q^) = 00, 01, 10, 11.
module tb_sm3_mux;
  localparam int W = 18;
  logic a_sel, q_sel;
  logic [W-1:0] n, b, d, x, expv;
  int checks = 0, failures = 0;

  sm3_mux #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      n = W'($urandom); b = W'($urandom); d = W'($urandom);
      {a_sel, q_sel} = 2'(t);
      #1;
      case (t % 4)
        0: expv = '0;
        1: expv = n;
        2: expv = b;
        default: expv = d;
      endcase
      checks++;
      if (x !== expv) begin failures++; $display("FAIL sel=%0d", t % 4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
