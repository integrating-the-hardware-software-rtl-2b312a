// sr04_ctrl: controller for one HC-SR04 ultrasonic distance sensor.
//
// The sensor starts a measurement when it sees a pulse on trig. It then holds
// echo high for as long as the ultrasonic burst takes to come back. This
// controller produces the trigger pulse, measures the echo time in clock
// cycles and enforces the sensor's minimum cycle time between triggers.
//
// Data path: a counter c that runs continuously and is cleared when a
// measurement starts, and a register t for the elapsed time.
// Control path, an FSM with five states:
//   idle  : ready = 1. start = 1 clears c and enters ping.
//   ping  : trig = 1 until c reaches TRIG_CYCLES (10 us at 100 MHz).
//   wait1 : wait for echo = 1, then t <= c.
//   time  : wait for echo = 0, then t <= c - t, the echo time.
//   wait2 : wait until c reaches CYCLE_TIME (60 ms at 100 MHz), then idle.
// The states, the two counter limits and the updates of t are those of the
// controller's state diagram. These are this design's own choices:
// - wait2 leaves once c >= CYCLE_TIME rather than only on equality, so an echo
//   longer than the cycle time cannot hang the FSM.
// - echo passes through SYNC_STAGES flip-flops first. This delays both of its
//   edges equally and leaves the measured time unchanged.
// - trig is driven from a flip-flop, so the pin does not glitch.
// - t is only cleared by reset. As in the state diagram, t holds the echo's
//   start count while the echo is high. The done pulse marks the cycle in which
//   t holds a finished measurement, so a wrapper can capture it there.
// Timing: trig rises at the clock edge that accepts start and stays high for
// TRIG_CYCLES + 1 cycles. t is echo's high time in cycles, exact to one cycle.
// ready rises CYCLE_TIME + 1 cycles after start was accepted.
module sr04_ctrl #(
  parameter int unsigned CW          = 32,         // width of c and t
  parameter int unsigned TRIG_CYCLES = 1000,       // 10 us at 100 MHz
  parameter int unsigned CYCLE_TIME  = 6_000_000,  // 60 ms at 100 MHz
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          echo,   // from the sensor, asynchronous
  output logic          trig,   // to the sensor
  output logic          ready,
  output logic          done,   // one-cycle pulse: t holds a new result
  output logic [CW-1:0] t
);

  typedef enum logic [2:0] {IDLE, PING, WAIT1, TIME, WAIT2} state_t;

  state_t              state, state_n;
  logic [CW-1:0]       c;
  logic [SYNC_STAGES-1:0] echo_sync;
  logic                echo_s;

  always_ff @(posedge clk) begin
    if (rst) echo_sync <= '0;
    else     echo_sync <= {echo_sync[SYNC_STAGES-2:0], echo};
  end
  assign echo_s = echo_sync[SYNC_STAGES-1];

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:  if (start)                  state_n = PING;
      PING:  if (c == CW'(TRIG_CYCLES))  state_n = WAIT1;
      WAIT1: if (echo_s)                 state_n = TIME;
      TIME:  if (!echo_s)                state_n = WAIT2;
      WAIT2: if (c >= CW'(CYCLE_TIME))   state_n = IDLE;
      default:                           state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      c     <= '0;
      t     <= '0;
      trig  <= 1'b0;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      done  <= (state == TIME) && !echo_s;
      trig  <= (state_n == PING);
      if (state == IDLE && start) c <= '0;
      else                        c <= c + 1'b1;
      if (state == WAIT1 && echo_s)  t <= c;
      if (state == TIME  && !echo_s) t <= c - t;
    end
  end

  assign ready = (state == IDLE);

endmodule
