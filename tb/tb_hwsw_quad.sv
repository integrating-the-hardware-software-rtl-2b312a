// tb_hwsw_quad: the platform with four HC-SR04 sensors on one SR04 core, the
// robot example of obstacles in four directions. All four controllers run in
// continuous mode at the same time, each sensor model sees a different
// distance, and the testbench (as the processor) just reads the four time
// registers. It checks every reading, that each sensor was triggered once per
// cycle time, and then single-mode starts on two sensors while the other two
// stay idle. Counter limits are scaled down (100-cycle trigger, 20000-cycle
// cycle time) to keep the run short. Echo widths are scaled by the same
// factor of 300 (real cycles / 300).
module tb_hwsw_quad;
  import mmio_pkg::*;

  localparam int unsigned NS   = 4;
  localparam int unsigned TRIG = 100;
  localparam int unsigned CYC  = 20_000;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  bus_req_t   bus = '0;
  word_t      bus_rdata;
  slot_req_t  uart_req;
  logic [7:0] gpo_out;
  logic       trig [NS];
  logic       echo [NS];
  word_t      gcd_rdata, bgcd_rdata, fib_rdata, fdiff_rdata, fir_rdata, ddfs_rdata;
  logic       ddfs_sq;
  logic [7:0] ddfs_wave;
  int unsigned delay_cyc [NS];
  int unsigned echo_cyc [NS];
  int unsigned n_trig [NS];
  int unsigned trig_w [NS];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  hwsw_top #(.N_SENSORS(NS), .TRIG_CYCLES(TRIG), .CYCLE_TIME(CYC)) dut (
    .clk, .rst, .bus, .bus_rdata, .uart_req, .uart_rdata('0),
    .gpi_in('0), .gpo_out, .sr04_trig(trig), .sr04_echo(echo),
    .gcd_req('0), .gcd_rdata, .bgcd_req('0), .bgcd_rdata, .fib_req('0), .fib_rdata, .fdiff_req('0), .fdiff_rdata,
    .fir_req('0), .fir_rdata, .ddfs_req('0), .ddfs_rdata, .ddfs_sq, .ddfs_wave
  );

  for (genvar i = 0; i < NS; i++) begin : g_sensor
    sr04_model sensor (.clk, .trig(trig[i]), .delay_cyc(delay_cyc[i]), .echo_cyc(echo_cyc[i]),
                       .echo(echo[i]), .n_trig(n_trig[i]), .last_trig_width(trig_w[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int unsigned a, input word_t d);
    @(negedge clk);
    bus = '0; bus.cs = 1; bus.wr = 1; bus.addr = BUS_AW'(a); bus.wdata = d;
    @(negedge clk);
    bus = '0;
  endtask

  task automatic rd(input int unsigned a, output word_t d);
    @(negedge clk);
    bus = '0; bus.cs = 1; bus.rd = 1; bus.addr = BUS_AW'(a);
    #1 d = bus_rdata;
    @(negedge clk);
    bus = '0;
  endtask

  function automatic int unsigned ha(input int unsigned i, input int unsigned r);
    return (int'(SLOT_HA) << REG_AW) | (4 * i + r);
  endfunction

  initial begin
    word_t d;
    int unsigned nt [NS];
    int unsigned dist_cm [NS] = '{30, 120, 75, 390};
    for (int i = 0; i < NS; i++) begin
      delay_cyc[i] = 100 + 7 * i;
      echo_cyc[i]  = dist_cm[i] * 2 * 100_000_000 / 34000 / 300;
    end
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    for (int i = 0; i < NS; i++) nt[i] = n_trig[i];
    for (int i = 0; i < NS; i++) wr(ha(i, SR04_REG_MODE), 1);
    repeat (3 * CYC + 500) @(negedge clk);
    for (int i = 0; i < NS; i++) begin
      rd(ha(i, SR04_REG_TIME), d);
      check(d == echo_cyc[i], $sformatf("sensor %0d time %0d expected %0d", i, d, echo_cyc[i]));
      check(n_trig[i] - nt[i] == 4, $sformatf("sensor %0d triggers %0d", i, n_trig[i] - nt[i]));
      check(trig_w[i] == TRIG + 1, "trigger width");
    end
    // back to single mode, then measure on sensors 1 and 3 only
    for (int i = 0; i < NS; i++) wr(ha(i, SR04_REG_MODE), 0);
    repeat (CYC + 500) @(negedge clk);
    for (int i = 0; i < NS; i++) nt[i] = n_trig[i];
    echo_cyc[1] = 111; echo_cyc[3] = 222;
    wr(ha(1, SR04_REG_START), 1);
    wr(ha(3, SR04_REG_START), 1);
    do begin
      word_t r1, r3;
      repeat (100) @(negedge clk);
      rd(ha(1, SR04_REG_READY), r1);
      rd(ha(3, SR04_REG_READY), r3);
      d = r1 & r3;
    end while (d[0] == 0);
    rd(ha(1, SR04_REG_TIME), d); check(d == 111, "single sensor 1");
    rd(ha(3, SR04_REG_TIME), d); check(d == 222, "single sensor 3");
    check(n_trig[0] == nt[0] && n_trig[2] == nt[2], "idle sensors not triggered");
    check(n_trig[1] == nt[1] + 1 && n_trig[3] == nt[3] + 1, "one trigger each");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
