// Self-checking testbench of pasta_adder at W = 16.
// Random and corner operands; sum must equal a + b.  The number of
// recursion steps is checked against a software model of the half-adder
// recursion, the bound steps <= W and the latency steps + 2 cycles from the
// start edge to done.  The longest carry chain (0xFFFF + 1) must take W
// steps and operands without any carry none.
module tb_pasta_adder;
  localparam int W = 16;
  logic clk = 1'b0, rst_n, start, busy, done;
  logic [W-1:0] a, b;
  logic [W:0] sum;
  logic [$clog2(W+2)-1:0] steps;
  int checks = 0, failures = 0;

  pasta_adder #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_steps(int unsigned av, int unsigned bv);
    int unsigned s, c, t;
    int k = 0;
    s = av ^ bv; c = (av & bv) << 1;
    while (c != 0) begin t = s ^ c; c = (s & c) << 1; s = t; k++; end
    return k;
  endfunction

  task automatic add(input int unsigned av, input int unsigned bv, input int exp_steps = -1);
    int cyc;
    @(negedge clk);
    a = W'(av); b = W'(bv); start = 1'b1;
    @(negedge clk);
    start = 1'b0; cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (int'(sum) != int'(av + bv)) begin failures++; $display("FAIL %0d+%0d=%0d", av, bv, sum); end
    checks++;
    if (int'(steps) != model_steps(av, bv) || int'(steps) > W) begin
      failures++; $display("FAIL steps %0d+%0d: %0d", av, bv, steps);
    end
    checks++;
    if (cyc != int'(steps) + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    if (exp_steps >= 0) begin
      checks++;
      if (int'(steps) != exp_steps) begin failures++; $display("FAIL corner steps %0d", steps); end
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    add(16'hFFFF, 16'h0001, W);
    add(16'hFFFF, 16'hFFFF);
    add(16'h5555, 16'hAAAA, 0);
    add(0, 0, 0);
    add(16'h8000, 16'h8000, 1);  // carry-out still takes one step
    for (int t = 0; t < 500; t++) add($urandom & 16'hFFFF, $urandom & 16'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
