// ddfs_core: the DDFS square-wave generator wrapped as a memory-mapped core.
//
// Register 0 (write, read back) holds the 32-bit frequency control word. The
// generator uses it from the cycle after the write. The square wave leaves
// through the sq output. The top 8 phase bits also address a sine table
// (ddfs_lut), whose 8-bit offset-binary samples leave through wave, one cycle
// behind the phase, for an external DAC. As the document puts it, software
// only writes the frequency control word. The single-register map and the
// sine table's size are this design's choices.
module ddfs_core
  import mmio_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  slot_req_t req,
  output word_t     rdata,
  output logic       sq,
  output logic [7:0] wave
);

  word_t       wreg [1];
  logic        wstb [1];
  word_t       rval [1];
  logic [31:0] phase;

  ha_wrap #(.N_REG(1)) u_wrap (.clk, .rst, .req, .rdata, .wreg, .wstb, .rval);

  ddfs #(.PW(32)) u_ddfs (.clk, .rst, .fcw(wreg[0]), .phase, .sq);

  ddfs_lut #(.AW(8), .DW(8)) u_lut (.clk, .addr(phase[31:24]), .amp(wave));

  assign rval[0] = wreg[0];

endmodule
