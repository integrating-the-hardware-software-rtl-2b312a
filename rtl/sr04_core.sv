// sr04_core: memory-mapped I/O core for N_SENSORS HC-SR04 distance sensors.
//
// Each sensor has its own sr04_ctrl controller and four registers, numbered
// 4*i + n for sensor i:
//   n = 0  write  mode: bit 0 = 1 continuous, 0 single measurement
//   n = 1  write  start one measurement (single mode; data ignored)
//   n = 2  read   ready: bit 0 = 1 when the controller is idle
//   n = 3  read   elapsed echo time of the last measurement, in clock cycles
// In continuous mode the controller's start input is held at 1, so it measures
// again as soon as the 60 ms cycle time has passed. In single mode, writing
// register 1 gives start a one-cycle pulse. Software should write it only while
// ready reads 1: a pulse that arrives while the controller is busy is dropped.
// Write-only registers read back as 0. Ready reads 0 from the cycle after a
// start write, so a poll right after the write cannot see a stale 1.
//
// The register map for one sensor, the two modes and the scaling to several
// sensors by adding controllers and registers follow the document. The mode
// and start encodings, the per-sensor register layout and the dropping of a
// start while busy are this design's own choices. So is the result register
// that keeps the last finished measurement, so that a read during a
// measurement in continuous mode never sees a partial value. All registers sit behind
// ha_wrap, so a value read lags the controller by one cycle.
module sr04_core
  import mmio_pkg::*;
#(
  parameter int unsigned N_SENSORS   = 1,
  parameter int unsigned TRIG_CYCLES = 1000,
  parameter int unsigned CYCLE_TIME  = 6_000_000
) (
  input  logic      clk,
  input  logic      rst,
  input  slot_req_t req,
  output word_t     rdata,
  output logic      trig [N_SENSORS],
  input  logic      echo [N_SENSORS]
);

  localparam int unsigned N_REG = 4 * N_SENSORS;

  word_t wreg [N_REG];
  logic  wstb [N_REG];
  word_t rval [N_REG];

  ha_wrap #(.N_REG(N_REG)) u_wrap (
    .clk, .rst, .req, .rdata, .wreg, .wstb, .rval
  );

  for (genvar i = 0; i < N_SENSORS; i++) begin : g_sensor
    logic        mode_cont, start, ready, done;
    logic [31:0] t, last_t;

    assign mode_cont = wreg[4*i + SR04_REG_MODE][0];
    assign start     = mode_cont | wstb[4*i + SR04_REG_START];

    sr04_ctrl #(
      .CW(32), .TRIG_CYCLES(TRIG_CYCLES), .CYCLE_TIME(CYCLE_TIME)
    ) u_ctrl (
      .clk, .rst, .start, .echo(echo[i]), .trig(trig[i]), .ready, .done, .t
    );

    // keep the last finished measurement: the controller's t register also
    // holds a start count while an echo is being timed
    always_ff @(posedge clk) begin
      if (rst)       last_t <= '0;
      else if (done) last_t <= t;
    end

    assign rval[4*i + SR04_REG_MODE]  = '0;
    assign rval[4*i + SR04_REG_START] = '0;
    assign rval[4*i + SR04_REG_READY] = word_t'(ready && !wstb[4*i + SR04_REG_START]);
    assign rval[4*i + SR04_REG_TIME]  = last_t;
  end

  initial assert (N_REG <= 2**REG_AW) else $error("too many sensors for one slot");

endmodule
