// mmio_interconnect: the I/O side of the platform bus.
//
// The processor sees every I/O core as a block of registers in one address
// space. The upper SLOT_AW bits of a bus address select one of 2**SLOT_AW
// slots, and the lower REG_AW bits select a register inside that slot. The
// interconnect decodes the slot, raises cs for that slot only and passes on
// the strobes, the register address and the write data. The read data of the
// selected slot goes back to the processor. It is purely combinational, so it
// adds no latency.
//
// The document shows a shared "MMIO interconnect" with the cores hanging off
// it. The slot/register split of the address and the slot count are this
// design's choices (see mmio_pkg).
module mmio_interconnect
  import mmio_pkg::*;
#(
  parameter int unsigned N_SLOTS = 2**SLOT_AW
) (
  input  bus_req_t  bus,
  output word_t     bus_rdata,
  output slot_req_t slot_req   [N_SLOTS],
  input  word_t     slot_rdata [N_SLOTS]
);

  logic [SLOT_AW-1:0] sel;
  assign sel = bus.addr[BUS_AW-1 -: SLOT_AW];

  always_comb begin
    for (int unsigned s = 0; s < N_SLOTS; s++) begin
      slot_req[s].cs    = bus.cs && (sel == SLOT_AW'(s));
      slot_req[s].wr    = bus.wr;
      slot_req[s].rd    = bus.rd;
      slot_req[s].addr  = bus.addr[REG_AW-1:0];
      slot_req[s].wdata = bus.wdata;
    end
    bus_rdata = '0;
    if (bus.cs && (32'(sel) < N_SLOTS))
      bus_rdata = slot_rdata[sel];
  end

endmodule
