// tb_sr04_core: self-checking testbench for the SR04 I/O core, driven only
// through its registers, as software would drive it.
// Two sensors, each answered by a behavioural sensor model with its own echo
// width. Single mode: write start, poll ready, read the time. Continuous mode:
// write mode = 1 once, then check that the core triggers again by itself every
// cycle time and that the time register follows a changed echo width. It also
// checks that the write-only registers read 0 and that a start written while
// busy triggers nothing. Small counter limits keep it short.
module tb_sr04_core;
  import mmio_pkg::*;
  localparam int unsigned NS   = 2;
  localparam int unsigned TRIG = 10;
  localparam int unsigned CYC  = 300;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  slot_req_t   req = '0;
  word_t       rdata;
  logic        trig [NS];
  logic        echo [NS];
  int unsigned delay_cyc [NS];
  int unsigned echo_cyc [NS];
  int unsigned n_trig [NS];
  int unsigned last_w [NS];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  sr04_core #(.N_SENSORS(NS), .TRIG_CYCLES(TRIG), .CYCLE_TIME(CYC)) dut (
    .clk, .rst, .req, .rdata, .trig, .echo
  );

  for (genvar i = 0; i < NS; i++) begin : g_sensor
    sr04_model sensor (.clk, .trig(trig[i]), .delay_cyc(delay_cyc[i]),
                       .echo_cyc(echo_cyc[i]), .echo(echo[i]),
                       .n_trig(n_trig[i]), .last_trig_width(last_w[i]));
  end

  `include "bus_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_ready(input int i);
    word_t d;
    do bus_rd(4*i + SR04_REG_READY, d); while (d[0] !== 1'b1);
  endtask

  initial begin
    word_t d;
    int unsigned nt0, nt1;
    delay_cyc[0] = 5;  echo_cyc[0] = 37;
    delay_cyc[1] = 11; echo_cyc[1] = 120;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (50) @(negedge clk);
    for (int i = 0; i < NS; i++) begin
      bus_rd(4*i + SR04_REG_READY, d); check(d == 1, "ready after reset");
      bus_rd(4*i + SR04_REG_MODE, d);  check(d == 0, "mode reads 0");
      bus_rd(4*i + SR04_REG_START, d); check(d == 0, "start reads 0");
    end
    // single mode, sensor 0 only
    nt0 = n_trig[0]; nt1 = n_trig[1];
    bus_wr(4*0 + SR04_REG_START, 1);
    bus_rd(4*0 + SR04_REG_READY, d); check(d == 0, "busy after start");
    bus_wr(4*0 + SR04_REG_START, 1);  // ignored: busy
    wait_ready(0);
    check(n_trig[0] == nt0 + 1, "one trigger on sensor 0");
    check(n_trig[1] == nt1, "no trigger on sensor 1");
    check(last_w[0] == TRIG + 1, "trigger width");
    bus_rd(4*0 + SR04_REG_TIME, d); check(d == 37, $sformatf("time 0 = %0d", d));
    // single mode, sensor 1
    bus_wr(4*1 + SR04_REG_START, 1);
    wait_ready(1);
    bus_rd(4*1 + SR04_REG_TIME, d); check(d == 120, $sformatf("time 1 = %0d", d));
    // continuous mode on both
    nt0 = n_trig[0]; nt1 = n_trig[1];
    bus_wr(4*0 + SR04_REG_MODE, 1);
    bus_wr(4*1 + SR04_REG_MODE, 1);
    repeat (CYC + 50) @(negedge clk);
    echo_cyc[0] = 64; echo_cyc[1] = 9;
    repeat (2 * (CYC + 1)) @(negedge clk);
    bus_rd(4*0 + SR04_REG_TIME, d); check(d == 64, $sformatf("cont time 0 = %0d", d));
    bus_rd(4*1 + SR04_REG_TIME, d); check(d == 9, $sformatf("cont time 1 = %0d", d));
    check(n_trig[0] - nt0 == 4, $sformatf("continuous triggers 0: %0d", n_trig[0] - nt0));
    check(n_trig[1] - nt1 == 4, $sformatf("continuous triggers 1: %0d", n_trig[1] - nt1));
    // back to single mode: triggering stops
    bus_wr(4*0 + SR04_REG_MODE, 0);
    bus_wr(4*1 + SR04_REG_MODE, 0);
    wait_ready(0); wait_ready(1);
    nt0 = n_trig[0];
    repeat (2 * CYC) @(negedge clk);
    check(n_trig[0] == nt0, "single mode stops triggering");
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
