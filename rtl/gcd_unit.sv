// gcd_unit: greatest common divisor by repeated subtraction.
//
// It follows the recursive definition
//   gcd(a, b) = a            if a = b
//             = gcd(a-b, b)  if a > b
//             = gcd(a, b-a)  if b > a
// as a small FSM with a data path of two registers, one comparator and one
// subtractor. Each clock cycle does one step of the recursion.
// Interface: while ready is 1, a start pulse loads a_in and b_in. When the two
// registers become equal, r takes the result and done pulses for one cycle,
// and ready returns the cycle after that.
// Latency: one cycle per subtraction plus one. gcd(a, b) with a = b finishes
// two cycles after start.
// The definition does not cover a zero operand: the subtraction would never
// end. In that case this design returns the other operand (gcd(0, b) = b)
// after a single step.
module gcd_unit #(
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

  typedef enum logic [0:0] {IDLE, OP} state_t;

  state_t       state;
  logic [W-1:0] a, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      a     <= '0;
      b     <= '0;
      r     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a     <= a_in;
          b     <= b_in;
          state <= OP;
        end
        OP: begin
          if (a == b || a == '0 || b == '0) begin
            r     <= (a == '0) ? b : a;
            done  <= 1'b1;
            state <= IDLE;
          end else if (a > b) begin
            a <= a - b;
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
