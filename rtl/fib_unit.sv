// fib_unit: Fibonacci-number accelerator, an FSM with a small data path.
//
// It computes F(n), with F(0) = 0, F(1) = 1 and F(i) = F(i-1) + F(i-2), by
// iteration. Two W-bit registers hold consecutive numbers, one adder forms the
// next, and a down-counter holds the remaining steps, one per clock cycle.
// Interface: while ready is 1, a start pulse loads n. After the result is in
// r, done pulses for one cycle. The result is F(n) modulo 2**W, exact for
// n <= 47 with W = 32.
// Latency: done comes n + 1 cycles after start (1 cycle for n = 0).
// The document only names the Fibonacci numbers as a function for an FSM with
// a data path. The iterative structure, the widths and the handshake are this
// design's own choices.
module fib_unit #(
  parameter int unsigned W  = 32,
  parameter int unsigned NW = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] n,
  output logic          ready,
  output logic          done,
  output logic [W-1:0]  r
);

  typedef enum logic [0:0] {IDLE, OP} state_t;

  state_t        state;
  logic [W-1:0]  f0, f1;   // f0 = F(i), f1 = F(i+1)
  logic [NW-1:0] cnt;      // steps left

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      f0    <= '0;
      f1    <= '0;
      cnt   <= '0;
      r     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          f0    <= '0;
          f1    <= W'(1);
          cnt   <= n;
          state <= OP;
        end
        OP: begin
          if (cnt == '0) begin
            r     <= f0;
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            f0  <= f1;
            f1  <= f0 + f1;
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign ready = (state == IDLE);

endmodule
