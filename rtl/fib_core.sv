// fib_core: the Fibonacci unit (fib_unit) wrapped as a memory-mapped core.
//
// Registers:
//   0  write  n (bits 5:0)
//   2  write  start (data ignored)  /  read  ready (bit 0)
//   3  read   F(n) of the last computation
// Software writes n, writes register 2, polls register 2 until it reads 1 and
// reads register 3. The register map mirrors gcd_core and is this design's own
// choice.
module fib_core
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

  fib_unit #(.W(32), .NW(6)) u_fib (
    .clk, .rst, .start(wstb[2]), .n(wreg[0][5:0]), .ready, .done, .r
  );

  assign rval[0] = '0;
  assign rval[1] = '0;
  assign rval[2] = word_t'(ready && !wstb[2]);  // not ready while a start is pending
  assign rval[3] = r;

endmodule
