// fdiff_core: the finite-difference polynomial unit (fdiff_unit, cubic)
// wrapped as a memory-mapped core.
//
// Registers:
//   0  write  difference index i (0..3)
//   1  write  initial difference d[i] (loaded at the index in register 0)
//   2  write  start: run wdata[15:0] steps  /  read  ready (bit 0)
//   3  read   current value p(x) after the last run
// To evaluate p(0), p(1), ... software loads p(0), Δp(0), Δ²p(0) and Δ³p(0).
// It then starts runs of one or more steps and reads register 3 after each
// one. The register map is this design's own choice.
module fdiff_core
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

  fdiff_unit #(.W(32), .ORDER(3), .NW(16)) u_fdiff (
    .clk, .rst,
    .d_we(wstb[1]), .d_idx(wreg[0][1:0]), .d_val(wreg[1]),
    .start(wstb[2]), .n(wreg[2][15:0]),
    .ready, .done, .r
  );

  assign rval[0] = '0;
  assign rval[1] = '0;
  assign rval[2] = word_t'(ready && !wstb[2]);  // not ready while a start is pending
  assign rval[3] = r;

endmodule
