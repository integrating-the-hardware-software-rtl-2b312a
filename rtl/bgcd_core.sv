// bgcd_core: the binary GCD unit (bgcd_unit) wrapped as a memory-mapped core,
// with the same register map as gcd_core:
//   0  write  operand a
//   1  write  operand b
//   2  write  start (data ignored)  /  read  ready (bit 0)
//   3  read   result of the last computation
// The register map is this design's own choice.
module bgcd_core
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

  bgcd_unit #(.W(32)) u_bgcd (
    .clk, .rst, .start(wstb[2]), .a_in(wreg[0]), .b_in(wreg[1]),
    .ready, .done, .r
  );

  assign rval[0] = '0;
  assign rval[1] = '0;
  assign rval[2] = word_t'(ready && !wstb[2]);  // not ready while a start is pending
  assign rval[3] = r;

endmodule
