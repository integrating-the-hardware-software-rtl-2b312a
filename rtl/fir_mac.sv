// fir_mac: N_TAPS-tap digital filter, y = sum over i of k_i * x(i), computed
// by an FSM with a data path that has N_MUL multipliers.
//
// x(0) is the newest sample and x(N_TAPS-1) the oldest. The samples sit in a
// shift register (the delay line) and the coefficients k_i in a register file
// that software loads one at a time. Pushing a sample (x_we while ready)
// shifts it into the delay line and starts a computation. Each following
// cycle multiplies N_MUL coefficient/sample pairs and adds the products to the
// accumulator, so the sum takes N_TAPS / N_MUL cycles. The result then
// appears on y, y_valid pulses and ready returns.
// Latency: y_valid comes N_TAPS/N_MUL + 1 cycles after the push (9 cycles with
// one multiplier, 2 with eight). N_MUL trades area for speed. The document
// names 1, 2, 4 and 8 multipliers for 8 taps. N_MUL must divide N_TAPS.
// The document gives the formula, the 8 taps and the multiplier counts. The
// word widths, the delay line, the coefficient loading, the default of one
// multiplier per tap and dropping a push while busy are this design's own
// choices. Arithmetic is signed two's complement, with a full-precision
// accumulator, so it cannot overflow.
module fir_mac #(
  parameter int unsigned N_TAPS = 8,
  parameter int unsigned N_MUL  = 8,
  parameter int unsigned DW     = 16,
  parameter int unsigned YW     = 2 * DW + $clog2(N_TAPS)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      coef_we,
  input  logic [$clog2(N_TAPS)-1:0] coef_idx,
  input  logic signed [DW-1:0]      coef_val,
  input  logic                      x_we,
  input  logic signed [DW-1:0]      x_val,
  output logic                      ready,
  output logic                      y_valid,
  output logic signed [YW-1:0]      y
);

  localparam int unsigned STEPS = N_TAPS / N_MUL;
  localparam int unsigned SW    = (STEPS > 1) ? $clog2(STEPS) : 1;

  logic signed [DW-1:0] k [N_TAPS];
  logic signed [DW-1:0] x [N_TAPS];
  logic signed [YW-1:0] acc, partial;
  logic [SW-1:0]        step;
  logic                 busy;

  // N_MUL multipliers working on taps step*N_MUL .. step*N_MUL + N_MUL-1
  always_comb begin
    partial = '0;
    for (int unsigned m = 0; m < N_MUL; m++)
      partial += YW'(k[32'(step) * N_MUL + m] * x[32'(step) * N_MUL + m]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < N_TAPS; i++) begin
        k[i] <= '0;
        x[i] <= '0;
      end
      acc     <= '0;
      y       <= '0;
      step    <= '0;
      busy    <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (coef_we) k[coef_idx] <= coef_val;
      if (!busy) begin
        if (x_we) begin
          x[0] <= x_val;
          for (int unsigned i = 1; i < N_TAPS; i++) x[i] <= x[i-1];
          acc  <= '0;
          step <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (32'(step) == STEPS - 1) begin
          y       <= acc + partial;
          y_valid <= 1'b1;
          busy    <= 1'b0;
        end else begin
          acc  <= acc + partial;
          step <= step + 1'b1;
        end
      end
    end
  end

  assign ready = !busy;

  initial assert (N_TAPS % N_MUL == 0) else $error("N_MUL must divide N_TAPS");

endmodule
