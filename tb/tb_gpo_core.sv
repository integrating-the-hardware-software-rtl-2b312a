// tb_gpo_core: self-checking testbench for the general-purpose output core.
// It writes random values and checks that the pins change one cycle after the
// write, hold between writes, read back through register 0, and reset to 0.
module tb_gpo_core;
  import mmio_pkg::*;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  slot_req_t    req = '0;
  word_t        rdata;
  logic [W-1:0] dout;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  gpo_core #(.W(W)) dut (.clk, .rst, .req, .rdata, .dout);

  `include "bus_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    word_t d;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(dout == '0, "reset value");
    for (int k = 0; k < 30; k++) begin
      word_t v;
      v = $urandom;
      bus_wr(0, v);
      check(dout == v[W-1:0], $sformatf("pins %02x after write %08x", dout, v));
      repeat ($urandom_range(0, 5)) @(negedge clk);
      check(dout == v[W-1:0], "pins hold");
      bus_rd(0, d);
      check(d == word_t'(v[W-1:0]), "read back");
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
