// timer_core: free-running 64-bit clock-cycle counter for the software time
// base (the now() and delay() routines of the board support package).
//
// Registers:
//   0  read   counter bits 31:0
//   1  read   counter bits 63:32
//   2  write  control: bit 0 = stop (0 after reset, so the timer runs),
//             bit 1 = clear (a write with bit 1 set zeroes the counter)
// At 100 MHz, software divides the count by 100 to get microseconds. The
// counter advances by one each cycle while stop is 0. Through ha_wrap, a read
// returns the count as it was one cycle earlier.
//
// The document only says that the platform has a timer core used for timing
// utilities. The register map and the 64-bit cycle count are this design's
// choices.
module timer_core
  import mmio_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  slot_req_t req,
  output word_t     rdata
);

  word_t       wreg [4];
  logic        wstb [4];
  word_t       rval [4];
  logic [63:0] count;
  logic        stop;

  ha_wrap #(.N_REG(4)) u_wrap (.clk, .rst, .req, .rdata, .wreg, .wstb, .rval);

  assign stop = wreg[2][0];

  always_ff @(posedge clk) begin
    if (rst)                        count <= '0;
    else if (wstb[2] && wreg[2][1]) count <= '0;
    else if (!stop)                 count <= count + 1'b1;
  end

  assign rval[0] = count[31:0];
  assign rval[1] = count[63:32];
  assign rval[2] = '0;
  assign rval[3] = '0;

endmodule
