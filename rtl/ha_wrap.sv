// ha_wrap: the "wrapping circuit" that turns a block of custom logic into a
// memory-mapped I/O core.
//
// Write side: a decoder turns the register address of a write request into a
// one-hot enable. The enabled register stores the write data. For each
// register the module also gives a one-cycle strobe, so a write can act as a
// command ("start") as well as set a value.
// Read side: every clock edge, each read register samples the value that the
// custom logic presents on rval. A multiplexer selected by the register address
// then drives rdata. Read data is combinational from those registers, so it is
// valid in the same cycle as cs/rd and lags the custom logic by one cycle.
//
// The split into a decoder with write registers and read registers with a mux
// follows the platform's block diagram, as does the default of four
// registers. Strobes, the register width and the behaviour of an address with
// no register (the write is dropped and the read returns 0) are this design's
// own choices. Reset clears every register.
module ha_wrap
  import mmio_pkg::*;
#(
  parameter int unsigned N_REG = 4
) (
  input  logic      clk,
  input  logic      rst,
  input  slot_req_t req,
  output word_t     rdata,
  // to the custom logic
  output word_t     wreg [N_REG],  // stored write registers
  output logic      wstb [N_REG],  // one-cycle pulse when register n is written
  // from the custom logic
  input  word_t     rval [N_REG]
);

  logic  [N_REG-1:0] wr_en;
  word_t             rreg [N_REG];

  // write decoder
  always_comb begin
    for (int unsigned n = 0; n < N_REG; n++)
      wr_en[n] = req.cs && req.wr && (req.addr == REG_AW'(n));
  end

  always_ff @(posedge clk) begin
    for (int unsigned n = 0; n < N_REG; n++) begin
      if (rst) begin
        wreg[n] <= '0;
        wstb[n] <= 1'b0;
        rreg[n] <= '0;
      end else begin
        if (wr_en[n]) wreg[n] <= req.wdata;
        wstb[n] <= wr_en[n];
        rreg[n] <= rval[n];
      end
    end
  end

  // read multiplexer
  always_comb begin
    rdata = '0;
    for (int unsigned n = 0; n < N_REG; n++)
      if (req.cs && req.rd && (req.addr == REG_AW'(n)))
        rdata = rreg[n];
  end

endmodule
