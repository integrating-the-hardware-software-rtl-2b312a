// tb_fib_unit: self-checking testbench for the Fibonacci unit. Every n from 0
// to 47 is compared with a reference sequence built in the testbench, and
// each latency with n + 1 cycles. It also checks n = 63, which wraps modulo
// 2**32.
module tb_fib_unit;
  localparam int unsigned W = 32, NW = 6;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          start = 1'b0;
  logic [NW-1:0] n = '0;
  logic          ready, done;
  logic [W-1:0]  r;
  int            checks = 0, failures = 0;
  logic [W-1:0]  fib_ref [64];

  always #5 clk = ~clk;

  fib_unit #(.W(W), .NW(NW)) dut (.clk, .rst, .start, .n, .ready, .done, .r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int unsigned nn);
    int unsigned cyc = 0;
    @(negedge clk);
    check(ready, "ready before start");
    n = NW'(nn); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    check(r == fib_ref[nn], $sformatf("F(%0d) = %0d expected %0d", nn, r, fib_ref[nn]));
    check(cyc == nn + 1, $sformatf("F(%0d): %0d cycles", nn, cyc));
  endtask

  initial begin
    fib_ref[0] = 0; fib_ref[1] = 1;
    for (int i = 2; i < 64; i++) fib_ref[i] = fib_ref[i-1] + fib_ref[i-2];
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i <= 47; i++) run(i);
    check(fib_ref[47] == 32'd2971215073, "reference F(47)");
    run(63);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
