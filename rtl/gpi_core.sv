// gpi_core: general-purpose input core.
//
// A W-bit input port goes through a two-flip-flop synchronizer and then into
// read register 0. Reading register 0 returns the pins as they were three
// clock cycles earlier. Software polls this register in the bit-bang version
// of the sensor driver. The document names the core only. The width and the
// synchronizer are this design's choices.
module gpi_core
  import mmio_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  slot_req_t    req,
  output word_t        rdata,
  input  logic [W-1:0] din
);

  word_t        wreg [1];
  logic         wstb [1];
  word_t        rval [1];
  logic [W-1:0] s1, s2;

  ha_wrap #(.N_REG(1)) u_wrap (.clk, .rst, .req, .rdata, .wreg, .wstb, .rval);

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= din;
      s2 <= s1;
    end
  end

  assign rval[0] = word_t'(s2);

endmodule
