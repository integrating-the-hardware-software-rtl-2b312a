// ddfs_lut: phase-to-amplitude lookup table behind the DDFS, for a sine wave.
//
// The top AW bits of the phase accumulator address a 2**AW-entry table. The
// entry is registered, so the amplitude appears one clock cycle after the
// phase. Each entry is an unsigned DW-bit sample, centred on mid-scale, ready
// for an offset-binary DAC:
//   table[i] = round((2**DW - 1) / 2 * (1 + sin(2*pi*i / 2**AW)))
// The table is computed at elaboration from this formula, so no data file is
// needed. It synthesizes to a ROM.
// The document only says that a lookup table and a DAC can follow the DDFS to
// make an analog wave. The sine shape, the table size and the sample width
// are this design's own choices. The DAC is not part of this design.
module ddfs_lut #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] amp
);

  typedef logic [DW-1:0] table_t [2**AW];

  function automatic table_t make_table();
    table_t t;
    real    pi = 3.14159265358979323846;
    real    half = (2.0 ** DW - 1.0) / 2.0;
    for (int i = 0; i < 2**AW; i++)
      t[i] = DW'($rtoi(half * (1.0 + $sin(2.0 * pi * i / (2.0 ** AW))) + 0.5));
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) amp <= TABLE[addr];

endmodule
