// tb_fdiff_unit: self-checking testbench for the finite-difference polynomial
// unit. For random cubic polynomials p(x) = a + b*x + c*x^2 + e*x^3 it computes
// the initial differences directly from p(0..3), loads them, and then compares
// each p(x) from the unit with p(x) evaluated by multiplication in the
// testbench. It uses single steps and multi-step runs, and checks the n + 1
// cycle latency.
module tb_fdiff_unit;
  localparam int unsigned W = 32, ORDER = 3, NW = 16;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          d_we = 1'b0, start = 1'b0;
  logic [1:0]    d_idx = '0;
  logic [W-1:0]  d_val = '0;
  logic [NW-1:0] n = '0;
  logic          ready, done;
  logic [W-1:0]  r;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  fdiff_unit #(.W(W), .ORDER(ORDER), .NW(NW)) dut (
    .clk, .rst, .d_we, .d_idx, .d_val, .start, .n, .ready, .done, .r
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [W-1:0] p(input int a, input int b, input int c, input int e, input int x);
    return W'(a + b * x + c * x * x + e * x * x * x);
  endfunction

  task automatic load(input int i, input logic [W-1:0] v);
    @(negedge clk);
    d_we = 1'b1; d_idx = 2'(i); d_val = v;
    @(negedge clk);
    d_we = 1'b0;
  endtask

  task automatic run(input int unsigned steps);
    int unsigned cyc = 0;
    @(negedge clk);
    check(ready, "ready before start");
    n = NW'(steps); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 70000) begin @(negedge clk); cyc++; end
    check(cyc == steps + 1, $sformatf("%0d steps took %0d cycles", steps, cyc));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 6; t++) begin
      int a, b, c, e, x;
      logic [W-1:0] p0, p1, p2, p3;
      a = $urandom_range(0, 2000) - 1000; b = $urandom_range(0, 200) - 100;
      c = $urandom_range(0, 40) - 20;     e = $urandom_range(0, 10) - 5;
      x = 0;
      if (t == 0) begin a = 5; b = 0; c = 0; e = 1; end  // x^3 + 5
      p0 = p(a, b, c, e, 0); p1 = p(a, b, c, e, 1); p2 = p(a, b, c, e, 2); p3 = p(a, b, c, e, 3);
      load(0, p0);
      load(1, p1 - p0);
      load(2, p2 - 2 * p1 + p0);
      load(3, p3 - 3 * p2 + 3 * p1 - p0);
      run(0);
      check(r == p0, "p(0)");
      for (int k = 0; k < 10; k++) begin
        run(1); x++;
        check(r == p(a, b, c, e, x), $sformatf("p(%0d) = %0d expected %0d", x, $signed(r), $signed(p(a, b, c, e, x))));
      end
      run(37); x += 37;
      check(r == p(a, b, c, e, x), $sformatf("p(%0d) after a run", x));
      run(500); x += 500;
      check(r == p(a, b, c, e, x), $sformatf("p(%0d) after a long run", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
