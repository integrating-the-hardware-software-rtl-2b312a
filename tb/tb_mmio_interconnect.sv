// tb_mmio_interconnect: self-checking testbench for the slot decoder. For
// random requests it checks that exactly the addressed slot sees cs, that
// strobes, register address and write data pass through unchanged, and that
// the read data comes from the addressed slot (0 when cs is low).
module tb_mmio_interconnect;
  import mmio_pkg::*;
  localparam int unsigned NS = 2**SLOT_AW;

  bus_req_t  bus;
  word_t     bus_rdata;
  slot_req_t slot_req   [NS];
  word_t     slot_rdata [NS];
  int        checks = 0, failures = 0;

  mmio_interconnect #(.N_SLOTS(NS)) dut (.bus, .bus_rdata, .slot_req, .slot_rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 200; k++) begin
      int unsigned s;
      bus.cs    = ($urandom_range(0, 3) != 0);
      bus.wr    = $urandom_range(0, 1);
      bus.rd    = !bus.wr;
      bus.addr  = BUS_AW'($urandom);
      bus.wdata = $urandom;
      for (int n = 0; n < NS; n++) slot_rdata[n] = $urandom;
      s = bus.addr >> REG_AW;
      #1;
      for (int n = 0; n < NS; n++) begin
        check(slot_req[n].cs == (bus.cs && n == s), $sformatf("cs of slot %0d", n));
        check(slot_req[n].wr == bus.wr && slot_req[n].rd == bus.rd, "strobes");
        check(slot_req[n].addr == bus.addr[REG_AW-1:0], "register address");
        check(slot_req[n].wdata == bus.wdata, "write data");
      end
      check(bus_rdata == (bus.cs ? slot_rdata[s] : '0), "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
