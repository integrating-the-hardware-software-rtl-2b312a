// tb_ha_wrap: self-checking testbench for the register wrapping circuit.
// With four registers it checks that a write lands only in the addressed
// register, that the strobe pulses for exactly one cycle, that read registers
// sample the custom logic's values one cycle late, that the read mux selects by
// address, and that an address with no register reads 0 and ignores writes.
module tb_ha_wrap;
  import mmio_pkg::*;
  localparam int unsigned N = 4;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  slot_req_t req = '0;
  word_t     rdata;
  word_t     wreg [N];
  logic      wstb [N];
  word_t     rval [N];
  int        checks = 0, failures = 0;
  int        stb_count [N];

  always #5 clk = ~clk;

  ha_wrap #(.N_REG(N)) dut (.clk, .rst, .req, .rdata, .wreg, .wstb, .rval);

  `include "bus_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk)
    for (int n = 0; n < N; n++) if (wstb[n]) stb_count[n]++;

  initial begin
    word_t d;
    word_t expect_w [N];
    for (int n = 0; n < N; n++) begin rval[n] = '0; stb_count[n] = 0; expect_w[n] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int n = 0; n < N; n++) check(wreg[n] == '0, "reset value");
    // writes
    for (int k = 0; k < 20; k++) begin
      int unsigned a;
      word_t v;
      int prev [N];
      a = $urandom_range(0, N - 1);
      v = $urandom;
      for (int n = 0; n < N; n++) prev[n] = stb_count[n];
      bus_wr(a, v);
      expect_w[a] = v;
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        check(wreg[n] == expect_w[n], $sformatf("wreg[%0d]", n));
        check(stb_count[n] - prev[n] == ((n == a) ? 1 : 0), $sformatf("strobe %0d", n));
      end
    end
    // write to an address with no register
    bus_wr(N + 3, 32'hdead_beef);
    for (int n = 0; n < N; n++) check(wreg[n] == expect_w[n], "no stray write");
    // reads
    for (int k = 0; k < 20; k++) begin
      for (int n = 0; n < N; n++) rval[n] = $urandom;
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        bus_rd(n, d);
        check(d == rval[n], $sformatf("read %0d", n));
      end
    end
    bus_rd(N + 1, d);
    check(d == '0, "unmapped read is 0");
    // read data only while cs and rd
    #1 check(rdata == '0, "rdata idle 0");
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
