// gcd_core: the GCD accelerator (gcd_unit) wrapped as a memory-mapped core.
//
// Registers:
//   0  write  operand a
//   1  write  operand b
//   2  write  start (data ignored)  /  read  ready (bit 0)
//   3  read   result of the last computation
// Software writes a and b, writes register 2, polls register 2 until it reads
// 1 and then reads register 3. The start strobe comes one cycle after the bus
// write, and reads lag the unit by one cycle (see ha_wrap). The register map is
// this design's own choice. The document only proposes GCD as an accelerator
// for the same slot as the sensor core.
module gcd_core
  import mmio_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  slot_req_t req,
  output word_t     rdata
);

  word_t wreg [4];
  logic  wstb [4];
  word_t rval [4];
  logic  ready, done;
  word_t r;

  ha_wrap #(.N_REG(4)) u_wrap (.clk, .rst, .req, .rdata, .wreg, .wstb, .rval);

  gcd_unit #(.W(32)) u_gcd (
    .clk, .rst, .start(wstb[2]), .a_in(wreg[0]), .b_in(wreg[1]),
    .ready, .done, .r
  );

  assign rval[0] = '0;
  assign rval[1] = '0;
  assign rval[2] = word_t'(ready && !wstb[2]);  // not ready while a start is pending
  assign rval[3] = r;

endmodule
