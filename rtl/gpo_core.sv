// gpo_core: general-purpose output core.
//
// Writing register 0 sets the W-bit output port. The new value appears on the
// pins one clock after the write and stays until the next write. Reset drives
// all outputs to 0. Register 0 reads back the value being driven. The document
// names the core only. The width and the read-back are this design's choices.
module gpo_core
  import mmio_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  slot_req_t    req,
  output word_t        rdata,
  output logic [W-1:0] dout
);

  word_t wreg [1];
  logic  wstb [1];
  word_t rval [1];

  ha_wrap #(.N_REG(1)) u_wrap (.clk, .rst, .req, .rdata, .wreg, .wstb, .rval);

  assign dout    = wreg[0][W-1:0];
  assign rval[0] = word_t'(dout);

endmodule
