// hwsw_top: the I/O side of the predesigned soft-core platform, with the
// HC-SR04 sensor core in its hardware-accelerator (HA) slot, and beside it the
// other accelerator cores that could take that slot.
//
// Platform (one MMIO bus from the processor):
//   slot 0  timer_core
//   slot 1  UART (vendor core, outside this design: uart_req / uart_rdata)
//   slot 2  gpi_core   (gpi_in)
//   slot 3  gpo_core   (gpo_out)
//   slot 4  HA slot: sr04_core with N_SENSORS controllers (sr04_trig/sr04_echo)
//   slots 5-7 unused (reads return 0)
// A bus address is {slot[2:0], register[4:0]} of 32-bit words. The processor
// and its RAM are outside this design. The processor's bus is the bus/bus_rdata
// port pair.
// Alternative accelerators for the HA slot, each on its own bus port, side by
// side with the platform: gcd_core, bgcd_core (binary GCD), fib_core
// (Fibonacci numbers), fdiff_core (polynomials by finite differences),
// fir_core (8-tap filter) and ddfs_core (ddfs_sq square wave, ddfs_wave
// sine samples for a DAC outside this design).
// Everything is in one clock domain (100 MHz in the document) with a
// synchronous active-high reset.
// The platform's set of cores and the HA slot follow the document's block
// diagram. The slot numbers, the address split and the separate ports for the
// alternative accelerators are this design's own choices.
module hwsw_top
  import mmio_pkg::*;
#(
  parameter int unsigned N_SENSORS   = 1,
  parameter int unsigned TRIG_CYCLES = 1000,
  parameter int unsigned CYCLE_TIME  = 6_000_000,
  parameter int unsigned GPIO_W      = 8,
  parameter int unsigned FIR_N_MUL   = 8
) (
  input  logic              clk,
  input  logic              rst,
  // platform MMIO bus (from the processor)
  input  bus_req_t          bus,
  output word_t             bus_rdata,
  // UART core (external)
  output slot_req_t         uart_req,
  input  word_t             uart_rdata,
  // general-purpose I/O pins
  input  logic [GPIO_W-1:0] gpi_in,
  output logic [GPIO_W-1:0] gpo_out,
  // HC-SR04 sensors
  output logic              sr04_trig [N_SENSORS],
  input  logic              sr04_echo [N_SENSORS],
  // alternative accelerators, each with its own bus port
  input  slot_req_t         gcd_req,
  output word_t             gcd_rdata,
  input  slot_req_t         bgcd_req,
  output word_t             bgcd_rdata,
  input  slot_req_t         fib_req,
  output word_t             fib_rdata,
  input  slot_req_t         fdiff_req,
  output word_t             fdiff_rdata,
  input  slot_req_t         fir_req,
  output word_t             fir_rdata,
  input  slot_req_t         ddfs_req,
  output word_t             ddfs_rdata,
  output logic              ddfs_sq,
  output logic [7:0]        ddfs_wave   // sine samples for an external DAC
);

  localparam int unsigned N_SLOTS = 2**SLOT_AW;

  slot_req_t slot_req   [N_SLOTS];
  word_t     slot_rdata [N_SLOTS];

  mmio_interconnect #(.N_SLOTS(N_SLOTS)) u_ic (
    .bus, .bus_rdata, .slot_req, .slot_rdata
  );

  timer_core u_timer (
    .clk, .rst, .req(slot_req[SLOT_TIMER]), .rdata(slot_rdata[SLOT_TIMER])
  );

  assign uart_req               = slot_req[SLOT_UART];
  assign slot_rdata[SLOT_UART]  = uart_rdata;

  gpi_core #(.W(GPIO_W)) u_gpi (
    .clk, .rst, .req(slot_req[SLOT_GPI]), .rdata(slot_rdata[SLOT_GPI]), .din(gpi_in)
  );

  gpo_core #(.W(GPIO_W)) u_gpo (
    .clk, .rst, .req(slot_req[SLOT_GPO]), .rdata(slot_rdata[SLOT_GPO]), .dout(gpo_out)
  );

  sr04_core #(
    .N_SENSORS(N_SENSORS), .TRIG_CYCLES(TRIG_CYCLES), .CYCLE_TIME(CYCLE_TIME)
  ) u_ha (
    .clk, .rst, .req(slot_req[SLOT_HA]), .rdata(slot_rdata[SLOT_HA]),
    .trig(sr04_trig), .echo(sr04_echo)
  );

  for (genvar s = int'(SLOT_HA) + 1; s < N_SLOTS; s++) begin : g_unused
    assign slot_rdata[s] = '0;
  end

  gcd_core u_gcd (.clk, .rst, .req(gcd_req), .rdata(gcd_rdata));

  bgcd_core u_bgcd (.clk, .rst, .req(bgcd_req), .rdata(bgcd_rdata));

  fib_core u_fib (.clk, .rst, .req(fib_req), .rdata(fib_rdata));

  fdiff_core u_fdiff (.clk, .rst, .req(fdiff_req), .rdata(fdiff_rdata));

  fir_core #(.N_TAPS(8), .N_MUL(FIR_N_MUL)) u_fir (
    .clk, .rst, .req(fir_req), .rdata(fir_rdata)
  );

  ddfs_core u_ddfs (.clk, .rst, .req(ddfs_req), .rdata(ddfs_rdata), .sq(ddfs_sq), .wave(ddfs_wave));

endmodule
