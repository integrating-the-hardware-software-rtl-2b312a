// tb_fir_mac: self-checking testbench for the 8-tap multiply-accumulate filter.
// Four instances with 1, 2, 4 and 8 multipliers get the same coefficients and
// samples. Each output is compared with a reference sum over the testbench's
// own copy of the delay line. Each latency is checked against 8/N_MUL + 1
// cycles from the sample push to y_valid. Full-scale negative values exercise
// the signed extremes. A push while busy must be ignored.
module tb_fir_mac;
  localparam int unsigned N  = 8;
  localparam int unsigned DW = 16;
  localparam int unsigned YW = 2 * DW + $clog2(N);
  localparam int unsigned NV = 4;
  localparam int unsigned MULS [NV] = '{1, 2, 4, 8};

  logic                   clk = 1'b0;
  logic                   rst = 1'b1;
  logic                   coef_we = 1'b0, x_we = 1'b0;
  logic [$clog2(N)-1:0]   coef_idx = '0;
  logic signed [DW-1:0]   coef_val = '0, x_val = '0;
  logic                   ready [NV];
  logic                   y_valid [NV];
  logic signed [YW-1:0]   y [NV];
  int                     checks = 0, failures = 0;
  logic signed [DW-1:0]   k_ref [N];
  logic signed [DW-1:0]   x_ref [N];

  always #5 clk = ~clk;

  for (genvar v = 0; v < NV; v++) begin : g_dut
    fir_mac #(.N_TAPS(N), .N_MUL(MULS[v]), .DW(DW)) dut (
      .clk, .rst, .coef_we, .coef_idx, .coef_val, .x_we, .x_val,
      .ready(ready[v]), .y_valid(y_valid[v]), .y(y[v])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_coef(input int i, input logic signed [DW-1:0] val);
    @(negedge clk);
    coef_we = 1'b1; coef_idx = i[$clog2(N)-1:0]; coef_val = val;
    @(negedge clk);
    coef_we = 1'b0;
    k_ref[i] = val;
  endtask

  task automatic push(input logic signed [DW-1:0] val);
    logic signed [YW-1:0] expect_y = '0;
    int  lat [NV];
    bit  seen [NV];
    for (int i = N - 1; i > 0; i--) x_ref[i] = x_ref[i-1];
    x_ref[0] = val;
    for (int i = 0; i < N; i++) expect_y += YW'(k_ref[i] * x_ref[i]);
    @(negedge clk);
    for (int v = 0; v < NV; v++) check(ready[v], "ready before push");
    x_we = 1'b1; x_val = val;
    @(negedge clk);
    // x_we stays high for one more cycle with another value: every variant is
    // busy then and must ignore it
    x_val = ~val;
    for (int v = 0; v < NV; v++) begin lat[v] = 0; seen[v] = 0; end
    for (int c = 1; c <= N + 2; c++) begin
      for (int v = 0; v < NV; v++)
        if (!seen[v] && y_valid[v]) begin seen[v] = 1; lat[v] = c; end
      if (c == 2) x_we = 1'b0;
      @(negedge clk);
    end
    for (int v = 0; v < NV; v++) begin
      check(seen[v] && lat[v] == N / MULS[v] + 1,
            $sformatf("N_MUL=%0d latency %0d expected %0d", MULS[v], lat[v], N / MULS[v] + 1));
      check(y[v] == expect_y, $sformatf("N_MUL=%0d y=%0d expected %0d", MULS[v], y[v], expect_y));
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin k_ref[i] = '0; x_ref[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // impulse response with coefficients 1..8
    for (int i = 0; i < N; i++) load_coef(i, DW'(i + 1));
    push(1);
    for (int i = 0; i < N - 1; i++) push(0);
    // random coefficients and samples
    for (int i = 0; i < N; i++) load_coef(i, DW'($urandom));
    for (int k = 0; k < 30; k++) push(DW'($urandom));
    // extremes
    for (int i = 0; i < N; i++) load_coef(i, {1'b1, {(DW-1){1'b0}}});
    for (int k = 0; k < N; k++) push({1'b1, {(DW-1){1'b0}}});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
