// tb_ddfs_lut: self-checking testbench for the sine lookup table. It reads
// every entry and checks:
// - the one-cycle read latency;
// - the four exact points: mid-scale at 0 and pi, full scale at pi/2, zero at
//   3*pi/2;
// - odd symmetry around mid-scale, which must hold to within one count;
// - monotonic rise over the first quarter;
// - agreement within one count with a reference built from sin(x) by Taylor
//   series, not by the library sine.
module tb_ddfs_lut;
  localparam int unsigned AW = 8, DW = 8;
  localparam int unsigned N  = 2**AW;

  logic          clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] amp;
  int            checks = 0, failures = 0;
  int            v [N];

  always #5 clk = ~clk;

  ddfs_lut #(.AW(AW), .DW(DW)) dut (.clk, .addr, .amp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real taylor_sin(input real x);
    real pi = 3.14159265358979323846;
    real term, sum;
    while (x > pi)  x -= 2.0 * pi;
    while (x < -pi) x += 2.0 * pi;
    term = x; sum = x;
    for (int k = 1; k < 15; k++) begin
      term = -term * x * x / ((2 * k) * (2 * k + 1));
      sum += term;
    end
    return sum;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk) addr = AW'(i);
      @(negedge clk) v[i] = amp;
    end
    // latency: change the address and look before and after one edge
    @(negedge clk) addr = AW'(N / 4);
    #1 check(amp == DW'(v[N - 1]), "old value until the clock edge");
    @(negedge clk) check(amp == DW'(v[N / 4]), "new value after one edge");
    check(v[0] == 128 && v[N/2] == 128, "mid-scale at 0 and pi");
    check(v[N/4] == 255, "full scale at pi/2");
    check(v[3*N/4] == 0, "zero at 3pi/2");
    for (int i = 1; i < N / 2; i++) begin
      int s;
      s = v[i] + v[N - i];
      check(s >= 255 && s <= 256, $sformatf("symmetry at %0d: %0d + %0d", i, v[i], v[N - i]));
    end
    for (int i = 1; i <= N / 4; i++) check(v[i] >= v[i-1], $sformatf("rising at %0d", i));
    for (int i = 0; i < N; i++) begin
      real r;
      r = 127.5 * (1.0 + taylor_sin(2.0 * 3.14159265358979323846 * i / N));
      check(real'(v[i]) > r - 1.0 && real'(v[i]) < r + 1.0, $sformatf("entry %0d = %0d, sine %f", i, v[i], r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
