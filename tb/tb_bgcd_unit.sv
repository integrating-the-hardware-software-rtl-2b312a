// tb_bgcd_unit: self-checking testbench for the binary (Stein) GCD unit.
// Results are compared with a reference computed by the Euclidean remainder
// method, for fixed cases (equal, zero, powers of two, coprime) and random
// 32-bit operands with and without common factors of two. Every run must end
// within 3*W + 4 cycles.
module tb_bgcd_unit;
  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         start = 1'b0;
  logic [W-1:0] a_in = '0, b_in = '0;
  logic         ready, done;
  logic [W-1:0] r;
  int           checks = 0, failures = 0;
  int unsigned  max_cyc = 0;

  always #5 clk = ~clk;

  bgcd_unit #(.W(W)) dut (.clk, .rst, .start, .a_in, .b_in, .ready, .done, .r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [W-1:0] ref_gcd(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] tmp;
    while (b != 0) begin tmp = a % b; a = b; b = tmp; end
    return a;
  endfunction

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b);
    int unsigned cyc = 0;
    @(negedge clk);
    check(ready, "ready before start");
    a_in = a; b_in = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    check(r == ref_gcd(a, b), $sformatf("bgcd(%0d,%0d) = %0d expected %0d", a, b, r, ref_gcd(a, b)));
    check(cyc <= 3 * W + 4, $sformatf("bgcd(%0d,%0d): %0d cycles", a, b, cyc));
    if (cyc > max_cyc) max_cyc = cyc;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(12, 12); run(48, 18); run(18, 48); run(0, 7); run(9, 0); run(0, 0);
    run(1, 1000); run(1071, 462); run(1 << 20, 1 << 7); run(32'hffff_ffff, 32'hffff_fffe);
    run(32'h8000_0000, 32'h8000_0000);
    for (int k = 0; k < 200; k++) begin
      logic [W-1:0] a, b;
      int sh;
      a = $urandom; b = $urandom;
      sh = $urandom_range(0, 12);
      if (k % 2 == 1) begin a = (a >> sh) << sh; b = (b >> sh) << sh; end
      run(a, b);
    end
    $display("longest run: %0d cycles", max_cyc);
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
