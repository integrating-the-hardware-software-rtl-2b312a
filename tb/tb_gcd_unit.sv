// tb_gcd_unit: self-checking testbench for the subtraction GCD unit. Results
// are compared with a reference computed by the Euclidean remainder method.
// The cycle count is compared with the number of subtraction steps, counted
// by a separate model of the recursion, plus one. It covers equal operands,
// a zero operand, coprime operands and random 32-bit and small operands.
module tb_gcd_unit;
  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         start = 1'b0;
  logic [W-1:0] a_in = '0, b_in = '0;
  logic         ready, done;
  logic [W-1:0] r;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  gcd_unit #(.W(W)) dut (.clk, .rst, .start, .a_in, .b_in, .ready, .done, .r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [W-1:0] ref_gcd(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] tmp;
    while (b != 0) begin tmp = a % b; a = b; b = tmp; end
    return a;
  endfunction

  function automatic int unsigned ref_steps(input logic [W-1:0] a, input logic [W-1:0] b);
    int unsigned n = 0;
    if (a == 0 || b == 0) return 0;
    // count subtractions using quotients so large inputs stay fast
    while (a != b) begin
      if (a > b) begin
        logic [W-1:0] q = (a - 1) / b;  // subtract until a <= b
        n += q; a -= q * b;
      end else begin
        logic [W-1:0] q = (b - 1) / a;
        n += q; b -= q * a;
      end
    end
    return n;
  endfunction

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b);
    int unsigned cyc = 0;
    int unsigned steps = ref_steps(a, b);
    @(negedge clk);
    check(ready, "ready before start");
    a_in = a; b_in = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin @(negedge clk); cyc++; if (cyc > 2000) break; end
    check(r == ((a == 0) ? b : ref_gcd(a, b)), $sformatf("gcd(%0d,%0d) = %0d", a, b, r));
    check(cyc == steps + 1, $sformatf("gcd(%0d,%0d): %0d cycles, expected %0d", a, b, cyc, steps + 1));
    @(negedge clk);
    check(ready, "ready after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(12, 12);
    run(48, 18);
    run(18, 48);
    run(17, 5);
    run(0, 7);
    run(9, 0);
    run(1, 1000);
    run(1071, 462);
    for (int k = 0; k < 40; k++) begin
      logic [W-1:0] g;
      g = $urandom_range(1, 50);
      run(g * $urandom_range(1, 60), g * $urandom_range(1, 60));
    end
    for (int k = 0; k < 20; k++) begin
      logic [W-1:0] a, b;
      a = $urandom; b = $urandom;
      if (ref_steps(a, b) < 1500) run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
