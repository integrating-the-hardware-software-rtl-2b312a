// fdiff_unit: polynomial evaluation by Newton's method of finite differences
// (the difference-engine scheme), as an FSM with a data path of ORDER adders.
//
// A polynomial p of degree ORDER is fixed by its value and its forward
// differences at x = 0: d[0] = p(0), d[1] = p(1) - p(0), d[2] = Δ²p(0), and so
// on. d[ORDER] is constant. One step replaces every d[i] by d[i] + d[i+1],
// all at once. After the step, d[0] = p(x+1). No multiplier is needed, only
// ORDER adders working in parallel.
// Interface: while ready is 1, d_we loads initial difference d_idx with d_val.
// A start pulse then runs n steps, one per clock cycle. r = p(n) and done
// pulses for one cycle n + 1 cycles after start. The difference registers keep
// their state, so a second start with count m continues to p(n + m).
// Arithmetic is W-bit two's complement and wraps modulo 2**W.
// The document only names Newton's method of finite differences as a function
// for an FSM with a data path. The order, the widths, the loading of the
// differences and the handshake are this design's own choices.
module fdiff_unit #(
  parameter int unsigned W     = 32,
  parameter int unsigned ORDER = 3,
  parameter int unsigned NW    = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         d_we,
  input  logic [$clog2(ORDER+1)-1:0]   d_idx,
  input  logic [W-1:0]                 d_val,
  input  logic                         start,
  input  logic [NW-1:0]                n,
  output logic                         ready,
  output logic                         done,
  output logic [W-1:0]                 r
);

  typedef enum logic [0:0] {IDLE, OP} state_t;

  state_t        state;
  logic [W-1:0]  d [ORDER+1];
  logic [NW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      for (int unsigned i = 0; i <= ORDER; i++) d[i] <= '0;
      cnt   <= '0;
      r     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (d_we && 32'(d_idx) <= ORDER) d[d_idx] <= d_val;
          if (start) begin
            cnt   <= n;
            state <= OP;
          end
        end
        OP: begin
          if (cnt == '0) begin
            r     <= d[0];
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            for (int unsigned i = 0; i < ORDER; i++) d[i] <= d[i] + d[i+1];
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign ready = (state == IDLE);

endmodule
