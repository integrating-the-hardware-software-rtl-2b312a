// tb_timer_core: self-checking testbench for the timer core. It checks that
// the 64-bit count advances by exactly one per clock cycle (two reads a known
// number of cycles apart), that stopping freezes it, that clear zeroes it, and
// that the upper word reads 0 this early after reset.
module tb_timer_core;
  import mmio_pkg::*;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  slot_req_t req = '0;
  word_t     rdata;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  timer_core dut (.clk, .rst, .req, .rdata);

  `include "bus_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    word_t a, b, h;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // running after reset: two reads gap+2 cycles apart (each read is one cycle)
    for (int k = 0; k < 10; k++) begin
      int unsigned gap;
      gap = $urandom_range(0, 50);
      bus_rd(0, a);
      repeat (gap) @(negedge clk);
      bus_rd(0, b);
      check(b - a == gap + 2, $sformatf("advance %0d over %0d cycles", b - a, gap + 2));
    end
    bus_rd(1, h);
    check(h == 0, "upper word");
    // stop
    bus_wr(2, 32'h1);
    bus_rd(0, a);
    repeat (20) @(negedge clk);
    bus_rd(0, b);
    check(a == b, "stopped");
    // clear while stopped
    bus_wr(2, 32'h3);
    repeat (2) @(negedge clk);
    bus_rd(0, a);
    check(a == 0, "cleared");
    // run again: clear + run
    bus_wr(2, 32'h2);
    repeat (10) @(negedge clk);
    bus_rd(0, a);
    check(a == 9, $sformatf("count after restart %0d", a));
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
