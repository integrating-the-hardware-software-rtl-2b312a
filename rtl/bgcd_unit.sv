// bgcd_unit: greatest common divisor by the binary Euclidean algorithm
// (Stein's algorithm), an FSM with a data path of shifters, a comparator and
// a subtractor. Unlike gcd_unit it needs no long runs of subtractions: each
// step halves an even operand or replaces the larger operand by the
// difference, which is even and is halved on the next step.
// Steps, one per clock cycle:
//   1. While both a and b are even, halve both and count the halvings in k.
//   2. While a is even, halve a.
//   3. Loop: halve b while it is even. Then, with both odd, put the smaller in
//      a and the difference in b. Stop when b = 0.
//   4. The result is a shifted left by k.
// Interface: the same as gcd_unit: start loads a_in and b_in while ready, done
// pulses when r is valid. A zero operand gives the other operand, since
// gcd(0, b) = b. A run takes at most about 3*W cycles for W-bit
// operands.
// The document only names the binary Euclid's algorithm as a function for an
// FSM with a data path. This implementation and its handshake are this
// design's own choices.
module bgcd_unit #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a_in,
  input  logic [W-1:0] b_in,
  output logic         ready,
  output logic         done,
  output logic [W-1:0] r
);

  localparam int unsigned KW = $clog2(W + 1);

  typedef enum logic [1:0] {IDLE, COMMON, ODD_A, LOOP} state_t;

  state_t        state;
  logic [W-1:0]  a, b;
  logic [KW-1:0] k;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      a     <= '0;
      b     <= '0;
      k     <= '0;
      r     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a     <= a_in;
          b     <= b_in;
          k     <= '0;
          state <= COMMON;
        end
        COMMON: begin
          if (a == '0 || b == '0) begin
            r     <= (a | b) << k;
            done  <= 1'b1;
            state <= IDLE;
          end else if (!a[0] && !b[0]) begin
            a <= a >> 1;
            b <= b >> 1;
            k <= k + 1'b1;
          end else begin
            state <= ODD_A;
          end
        end
        ODD_A: begin
          if (!a[0]) a <= a >> 1;
          else       state <= LOOP;
        end
        LOOP: begin
          if (b == '0) begin
            r     <= a << k;
            done  <= 1'b1;
            state <= IDLE;
          end else if (!b[0]) begin
            b <= b >> 1;
          end else if (a > b) begin
            a <= b;
            b <= a - b;
          end else begin
            b <= b - a;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign ready = (state == IDLE);

endmodule
