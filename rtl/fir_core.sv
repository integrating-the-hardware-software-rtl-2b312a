// fir_core: the 8-tap filter (fir_mac) wrapped as a memory-mapped core.
//
// Registers:
//   0  write  coefficient index i
//   1  write  coefficient value k_i (12-bit signed, loaded at the index last
//             written to register 0)
//   2  write  push sample x (12-bit signed): shifts it into the delay line and
//             starts a computation  /  read  ready (bit 0)
//   3  read   filter output y (sign-extended to 32 bits)
// The register map is this design's own choice.
module fir_core
  import mmio_pkg::*;
#(
  parameter int unsigned N_TAPS = 8,
  parameter int unsigned N_MUL  = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  slot_req_t req,
  output word_t     rdata
);

  localparam int unsigned DW = 12;  // keeps y (27 bits) inside one 32-bit register
  localparam int unsigned YW = 2 * DW + $clog2(N_TAPS);

  word_t                wreg [4];
  logic                 wstb [4];
  word_t                rval [4];
  logic                 ready, y_valid;
  logic signed [YW-1:0] y;

  ha_wrap #(.N_REG(4)) u_wrap (.clk, .rst, .req, .rdata, .wreg, .wstb, .rval);

  fir_mac #(.N_TAPS(N_TAPS), .N_MUL(N_MUL), .DW(DW)) u_fir (
    .clk, .rst,
    .coef_we(wstb[1]), .coef_idx(wreg[0][$clog2(N_TAPS)-1:0]), .coef_val(wreg[1][DW-1:0]),
    .x_we(wstb[2]), .x_val(wreg[2][DW-1:0]),
    .ready, .y_valid, .y
  );

  assign rval[0] = '0;
  assign rval[1] = '0;
  assign rval[2] = word_t'(ready && !wstb[2]);
  assign rval[3] = word_t'(y);  // sign-extended

endmodule
