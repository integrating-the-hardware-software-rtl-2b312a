// tb_sr04_ctrl: self-checking testbench for the HC-SR04 controller.
//
// A behavioural sensor model answers each trigger with an echo of a chosen
// width. The testbench checks, against values worked out from the state
// diagram:
// - the trigger pulse width (TRIG_CYCLES + 1 cycles);
// - the measured time t (exactly the echo width);
// - that ready is low during a measurement and returns CYCLE_TIME + 1 cycles
//   after start was accepted;
// - that a start while busy is ignored;
// - back-to-back continuous measurements, with start held at 1;
// - an echo longer than the cycle time.
// Small counter limits keep it short.
module tb_sr04_ctrl;
  localparam int unsigned TRIG = 20;
  localparam int unsigned CYC  = 400;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        start = 1'b0;
  logic        echo, trig, ready, done;
  int unsigned n_done = 0;
  logic [31:0] t;
  int unsigned delay_cyc = 7, echo_cyc = 50;
  int unsigned n_trig, last_w;
  int          checks = 0, failures = 0;
  longint      cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (done) n_done <= n_done + 1;

  sr04_ctrl #(.CW(32), .TRIG_CYCLES(TRIG), .CYCLE_TIME(CYC)) dut (
    .clk, .rst, .start, .echo, .trig, .ready, .done, .t
  );
  sr04_model sensor (.clk, .trig, .delay_cyc, .echo_cyc, .echo,
                     .n_trig, .last_trig_width(last_w));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0d)", what, t); end
  endtask

  // one measurement in single mode; returns cycles from start to ready
  task automatic measure(input int unsigned d, input int unsigned w);
    longint c0;
    int unsigned nt, nd;
    delay_cyc = d; echo_cyc = w;
    nt = n_trig;
    nd = n_done;
    @(negedge clk);
    check(ready == 1'b1, "ready before start");
    start = 1'b1;
    @(negedge clk);
    c0 = cyc;
    start = 1'b0;
    check(ready == 1'b0, "ready drops after start");
    check(trig == 1'b1, "trig high after start");
    // a start while busy must be ignored
    repeat (3) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    while (!ready) @(negedge clk);
    // ready returns CYCLE_TIME + 1 cycles after start, or later if the echo
    // ends after that (trigger, model, synchronizer and FSM delays add 6 cycles)
    if (TRIG + d + w + 6 <= CYC)
      check(cyc - c0 == longint'(CYC) + 1, $sformatf("ready after %0d cycles", cyc - c0));
    else
      check(cyc - c0 == longint'(TRIG + d + w + 6), $sformatf("late ready after %0d cycles", cyc - c0));
    check(last_w == TRIG + 1, $sformatf("trigger width %0d", last_w));
    check(n_trig == nt + 1, "one trigger per measurement");
    check(n_done == nd + 1, "one done pulse per measurement");
    check(t == w, $sformatf("echo time %0d expected %0d (delay %0d)", t, w, d));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (100) @(negedge clk);
    check(ready && !trig, "idle after reset");
    measure(7, 50);
    measure(1, 1);
    measure(30, 200);
    measure(5, 333);
    // echo longer than the cycle time: the FSM must still return to idle
    measure(2, 500);
    // continuous: start held at 1
    begin
      int unsigned nt;
      echo_cyc = 40; delay_cyc = 3;
      nt = n_trig;
      @(negedge clk); start = 1'b1;
      repeat (3 * (CYC + 1) + 10) @(negedge clk);
      start = 1'b0;
      check(n_trig - nt == 4, $sformatf("continuous triggers %0d", n_trig - nt));
      while (!ready) @(negedge clk);
      check(t == 40, "continuous echo time");
    end
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
