// tb_gpi_core: self-checking testbench for the general-purpose input core. It
// drives random pin values and checks that register 0 returns them after the
// synchronizer and read-register delay (three cycles), and not earlier.
module tb_gpi_core;
  import mmio_pkg::*;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  slot_req_t    req = '0;
  word_t        rdata;
  logic [W-1:0] din = '0;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  gpi_core #(.W(W)) dut (.clk, .rst, .req, .rdata, .din);

  `include "bus_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    word_t d;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    bus_rd(0, d);
    check(d == 0, "zero input");
    for (int k = 0; k < 30; k++) begin
      logic [W-1:0] v, old;
      old = din;
      do v = W'($urandom); while (v == old);
      @(negedge clk) din = v;
      // read in the cycle after the change: still the old value
      bus_rd(0, d);
      check(d == word_t'(old), "not yet visible");
      repeat (1) @(negedge clk);
      bus_rd(0, d);
      check(d == word_t'(v), $sformatf("input %02x read %08x", v, d));
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
