// sr04_model: behavioural model of the HC-SR04 sensor module, for testbenches
// only (not synthesizable logic).
//
// After a falling edge on trig, the model waits delay_cyc clock cycles, then
// holds echo high for echo_cyc cycles, which stands for the round trip of the
// ultrasonic burst. It counts the trigger pulses it has seen and records the
// width of the last one, in clock cycles. A real module also needs a trigger
// pulse of at least 10 us and ignores triggers during a measurement. The model
// does not check either.
module sr04_model (
  input  logic        clk,
  input  logic        trig,
  input  int unsigned delay_cyc,
  input  int unsigned echo_cyc,
  output logic        echo,
  output int unsigned n_trig,
  output int unsigned last_trig_width
);
  logic        trig_q = 1'b0;
  int unsigned width  = 0;
  int unsigned cnt    = 0;
  typedef enum {M_IDLE, M_DELAY, M_ECHO} mstate_t;
  mstate_t st = M_IDLE;

  initial begin
    echo = 1'b0;
    n_trig = 0;
    last_trig_width = 0;
  end

  always @(posedge clk) begin
    trig_q <= trig;
    if (trig) width <= width + 1;
    if (trig && !trig_q) n_trig <= n_trig + 1;
    if (!trig && trig_q) begin
      last_trig_width <= width;
      width <= 0;
      st    <= M_DELAY;
      cnt   <= 0;
      echo  <= 1'b0;
    end else begin
      case (st)
        M_DELAY: if (cnt + 1 >= delay_cyc) begin st <= M_ECHO; cnt <= 0; echo <= 1'b1; end
                 else cnt <= cnt + 1;
        M_ECHO:  if (cnt + 1 >= echo_cyc) begin st <= M_IDLE; echo <= 1'b0; end
                 else cnt <= cnt + 1;
        default: ;
      endcase
    end
  end
endmodule
