// ddfs: direct digital frequency synthesis of a square wave.
//
// A PW-bit phase accumulator (one adder and one register) adds the frequency
// control word fcw every clock cycle. Its most significant bit is the square
// wave. The output frequency is f = fcw * f_clk / 2**PW, up to f_clk / 2 at
// fcw = 2**(PW-1). The phase is also brought out so a lookup table can turn it
// into other waveforms.
// The document gives the scheme, the adder and the register, and the f_clk/2
// limit. The 32-bit phase width and the reset to phase 0 are this design's
// choices.
module ddfs #(
  parameter int unsigned PW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [PW-1:0] fcw,
  output logic [PW-1:0] phase,
  output logic          sq
);

  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + fcw;
  end

  assign sq = phase[PW-1];

endmodule
