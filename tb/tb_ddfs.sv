// tb_ddfs: self-checking testbench for the DDFS square-wave generator.
// For several frequency control words it checks, against a 64-bit reference
// accumulator, the phase every cycle and the number of square-wave edges over
// a run. The count must equal the number of times the phase crosses a
// half-period boundary. The highest setting, fcw = 2**31, must toggle sq on
// every cycle (f_clk / 2).
module tb_ddfs;
  localparam int unsigned PW = 32;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic [PW-1:0] fcw = '0;
  logic [PW-1:0] phase;
  logic          sq;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddfs #(.PW(PW)) dut (.clk, .rst, .fcw, .phase, .sq);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic [PW-1:0] f, input int unsigned cycles);
    longint unsigned acc;
    int unsigned     edges = 0, expect_edges;
    logic            sq_prev;
    bit              phase_ok = 1;
    @(negedge clk);
    fcw = f;
    acc = phase;
    sq_prev = sq;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      acc += f;
      if (phase != acc[PW-1:0]) phase_ok = 0;
      if (sq != sq_prev) edges++;
      sq_prev = sq;
    end
    expect_edges = int'((acc >> (PW - 1)) - ((acc - longint'(f) * cycles) >> (PW - 1)));
    check(phase_ok, $sformatf("phase track fcw=%0h", f));
    check(edges == expect_edges, $sformatf("fcw=%0h edges %0d expected %0d", f, edges, expect_edges));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(phase == 0 && sq == 0, "reset phase");
    run(32'h8000_0000, 100);       // f_clk / 2: edge every cycle
    run(32'h4000_0000, 100);       // f_clk / 4
    run(32'h0100_0000, 2000);      // f_clk / 256
    run(32'h0123_4567, 3000);
    run(32'h0000_0000, 50);        // stopped
    // random words below the f_clk / 2 limit (above it the square wave aliases)
    for (int k = 0; k < 10; k++) run($urandom >> 1, 1000);
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
