// tb_hwsw_top: end-to-end testbench of the whole design at its default sizes
// (100 MHz clock counts: 10 us trigger, 60 ms cycle time, one sensor).
//
// The testbench plays the processor. It runs, through the bus ports only:
//  1. the bit-bang sensor driver: trigger pulse on a GPO pin, timed by
//     polling the timer; echo polled on a GPI pin. A second sensor model is
//     wired to those pins (object at 10 cm).
//  2. the SR04 core in single-measurement mode: start, poll ready, read the
//     time (object at 100 cm), plus a start while busy, which must be ignored.
//  3. the SR04 core in continuous mode: mode = 1 once. The object then moves to
//     250 cm, and the time register must follow with one trigger per 60 ms.
//  4. the UART slot (outside the design) and an unused slot.
//  5. the GCD, binary GCD, Fibonacci, finite-difference, filter and DDFS
//     accelerators on their own ports (DDFS: square-wave edges and the full
//     swing of the sine samples).
// Distances are converted as the driver software does: d = cycles * 10 ns *
// 34000 cm/s / 2. Each mechanism is counted, and one that never happened
// counts as a failure.
module tb_hwsw_top;
  import mmio_pkg::*;

  localparam longint CLK_HZ = 100_000_000;
  localparam int unsigned GW = 8;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  bus_req_t      bus = '0;
  word_t         bus_rdata;
  slot_req_t     uart_req;
  word_t         uart_rdata = 32'h0000_0a5a;
  logic [GW-1:0] gpi_in, gpo_out;
  logic          sr04_trig [1];
  logic          sr04_echo [1];
  slot_req_t     gcd_req = '0, fir_req = '0, ddfs_req = '0, bgcd_req = '0, fib_req = '0, fdiff_req = '0;
  word_t         gcd_rdata, fir_rdata, ddfs_rdata, bgcd_rdata, fib_rdata, fdiff_rdata;
  logic          ddfs_sq;
  logic [7:0]    ddfs_wave;
  int            checks = 0, failures = 0;

  // sensor on the accelerator core
  int unsigned   ha_delay = 50_000, ha_echo = 0, ha_ntrig, ha_trigw;
  // sensor on the general-purpose pins (bit-bang driver)
  int unsigned   bb_delay = 50_000, bb_echo = 0, bb_ntrig, bb_trigw;
  logic          bb_echo_pin;

  // mechanism counters
  int n_bitbang = 0, n_single = 0, n_busy_ignored = 0, n_continuous = 0;
  int n_uart = 0, n_bgcd = 0, n_fib = 0, n_fdiff = 0, n_gcd = 0, n_fir = 0, n_ddfs = 0, n_timer = 0;

  always #5 clk = ~clk;

  hwsw_top dut (
    .clk, .rst, .bus, .bus_rdata, .uart_req, .uart_rdata,
    .gpi_in, .gpo_out, .sr04_trig, .sr04_echo,
    .gcd_req, .gcd_rdata, .bgcd_req, .bgcd_rdata, .fib_req, .fib_rdata, .fdiff_req, .fdiff_rdata, .fir_req, .fir_rdata, .ddfs_req, .ddfs_rdata, .ddfs_sq, .ddfs_wave
  );

  sr04_model ha_sensor (.clk, .trig(sr04_trig[0]), .delay_cyc(ha_delay), .echo_cyc(ha_echo),
                        .echo(sr04_echo[0]), .n_trig(ha_ntrig), .last_trig_width(ha_trigw));
  sr04_model bb_sensor (.clk, .trig(gpo_out[0]), .delay_cyc(bb_delay), .echo_cyc(bb_echo),
                        .echo(bb_echo_pin), .n_trig(bb_ntrig), .last_trig_width(bb_trigw));
  assign gpi_in = {{(GW-1){1'b0}}, bb_echo_pin};

  always @(posedge clk) if (uart_req.cs) n_uart++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // echo time in cycles for an object at d_cm (sound at 34000 cm/s)
  function automatic int unsigned echo_cycles(input int unsigned d_cm);
    return int'(longint'(d_cm) * 2 * CLK_HZ / 34000);
  endfunction

  function automatic real cycles_to_cm(input longint unsigned cyc);
    return real'(cyc) * 10.0e-9 * 34000.0 / 2.0;
  endfunction

  // ---- bus operations: port 0 = platform bus, 1 = gcd, 2 = fir, 3 = ddfs,
  // 4 = binary gcd, 5 = fibonacci, 6 = finite differences
  task automatic wr(input int port, input int unsigned a, input word_t d);
    @(negedge clk);
    case (port)
      0: begin bus = '0; bus.cs = 1; bus.wr = 1; bus.addr = BUS_AW'(a); bus.wdata = d; end
      1: begin gcd_req = '0; gcd_req.cs = 1; gcd_req.wr = 1; gcd_req.addr = REG_AW'(a); gcd_req.wdata = d; end
      2: begin fir_req = '0; fir_req.cs = 1; fir_req.wr = 1; fir_req.addr = REG_AW'(a); fir_req.wdata = d; end
      4: begin bgcd_req = '0; bgcd_req.cs = 1; bgcd_req.wr = 1; bgcd_req.addr = REG_AW'(a); bgcd_req.wdata = d; end
      5: begin fib_req = '0; fib_req.cs = 1; fib_req.wr = 1; fib_req.addr = REG_AW'(a); fib_req.wdata = d; end
      6: begin fdiff_req = '0; fdiff_req.cs = 1; fdiff_req.wr = 1; fdiff_req.addr = REG_AW'(a); fdiff_req.wdata = d; end
      default: begin ddfs_req = '0; ddfs_req.cs = 1; ddfs_req.wr = 1; ddfs_req.addr = REG_AW'(a); ddfs_req.wdata = d; end
    endcase
    @(negedge clk);
    bus = '0; gcd_req = '0; fir_req = '0; ddfs_req = '0; bgcd_req = '0; fib_req = '0; fdiff_req = '0;
  endtask

  task automatic rd(input int port, input int unsigned a, output word_t d);
    @(negedge clk);
    case (port)
      0: begin bus = '0; bus.cs = 1; bus.rd = 1; bus.addr = BUS_AW'(a); end
      1: begin gcd_req = '0; gcd_req.cs = 1; gcd_req.rd = 1; gcd_req.addr = REG_AW'(a); end
      2: begin fir_req = '0; fir_req.cs = 1; fir_req.rd = 1; fir_req.addr = REG_AW'(a); end
      4: begin bgcd_req = '0; bgcd_req.cs = 1; bgcd_req.rd = 1; bgcd_req.addr = REG_AW'(a); end
      5: begin fib_req = '0; fib_req.cs = 1; fib_req.rd = 1; fib_req.addr = REG_AW'(a); end
      6: begin fdiff_req = '0; fdiff_req.cs = 1; fdiff_req.rd = 1; fdiff_req.addr = REG_AW'(a); end
      default: begin ddfs_req = '0; ddfs_req.cs = 1; ddfs_req.rd = 1; ddfs_req.addr = REG_AW'(a); end
    endcase
    #1;
    case (port)
      0: d = bus_rdata;
      1: d = gcd_rdata;
      2: d = fir_rdata;
      4: d = bgcd_rdata;
      5: d = fib_rdata;
      6: d = fdiff_rdata;
      default: d = ddfs_rdata;
    endcase
    @(negedge clk);
    bus = '0; gcd_req = '0; fir_req = '0; ddfs_req = '0; bgcd_req = '0; fib_req = '0; fdiff_req = '0;
  endtask

  function automatic int unsigned ad(input logic [SLOT_AW-1:0] slot, input int unsigned r);
    return (int'(slot) << REG_AW) | r;
  endfunction

  task automatic now(output longint unsigned t);
    word_t lo, hi;
    rd(0, ad(SLOT_TIMER, 1), hi);
    rd(0, ad(SLOT_TIMER, 0), lo);
    t = {hi, lo};
  endtask

  // ---------------------------------------------------------------- tests
  task automatic test_bitbang();
    longint unsigned t0, t1, t_start, t_end;
    word_t d;
    int unsigned expect_c = echo_cycles(10);
    bb_echo = expect_c;
    // 10 us trigger pulse on GPO bit 0, timed with the timer
    wr(0, ad(SLOT_GPO, 0), 1);
    now(t0);
    do now(t1); while (t1 - t0 < 1000);
    wr(0, ad(SLOT_GPO, 0), 0);
    repeat (3) @(negedge clk);
    check(bb_trigw >= 1000, $sformatf("bit-bang trigger width %0d", bb_trigw));
    do rd(0, ad(SLOT_GPI, 0), d); while (d[0] == 0);
    now(t_start);
    do rd(0, ad(SLOT_GPI, 0), d); while (d[0] == 1);
    now(t_end);
    // polling loop of 1 GPI read + 2 timer reads: 6 cycles of uncertainty
    check(t_end - t_start + 10 >= expect_c && t_end - t_start <= expect_c + 10,
          $sformatf("bit-bang echo %0d cycles, expected %0d", t_end - t_start, expect_c));
    $display("bit-bang: %0d cycles = %.2f cm", t_end - t_start, cycles_to_cm(t_end - t_start));
    n_bitbang++;
    if (t1 > t0) n_timer++;
  endtask

  task automatic wait_ready();
    word_t d;
    do begin
      repeat (1000) @(negedge clk);
      rd(0, ad(SLOT_HA, SR04_REG_READY), d);
    end while (d[0] == 0);
  endtask

  task automatic test_single(input int unsigned d_cm);
    word_t d;
    int unsigned nt = ha_ntrig;
    ha_echo = echo_cycles(d_cm);
    wr(0, ad(SLOT_HA, SR04_REG_START), 1);
    rd(0, ad(SLOT_HA, SR04_REG_READY), d);
    check(d == 0, "busy after start");
    repeat (100) @(negedge clk);
    wr(0, ad(SLOT_HA, SR04_REG_START), 1);   // busy: must be ignored
    wait_ready();
    check(ha_ntrig == nt + 1, "exactly one trigger");
    if (ha_ntrig == nt + 1) n_busy_ignored++;
    check(ha_trigw == 1001, $sformatf("trigger width %0d cycles", ha_trigw));
    rd(0, ad(SLOT_HA, SR04_REG_TIME), d);
    check(d == ha_echo, $sformatf("echo time %0d expected %0d", d, ha_echo));
    check(cycles_to_cm(d) > real'(d_cm) - 0.3 && cycles_to_cm(d) < real'(d_cm) + 0.3,
          $sformatf("distance %.2f cm", cycles_to_cm(d)));
    $display("single: %0d cycles = %.2f cm", d, cycles_to_cm(d));
    n_single++;
  endtask

  task automatic test_continuous();
    word_t d;
    int unsigned nt;
    longint unsigned c0;
    ha_echo = echo_cycles(40);
    wr(0, ad(SLOT_HA, SR04_REG_MODE), 1);
    nt = ha_ntrig;
    // first measurement in progress; move the object during it
    repeat (6_000_010) @(negedge clk);
    ha_echo = echo_cycles(250);
    rd(0, ad(SLOT_HA, SR04_REG_TIME), d);
    check(d == echo_cycles(40), $sformatf("continuous 1st: %0d", d));
    repeat (6_000_010) @(negedge clk);
    rd(0, ad(SLOT_HA, SR04_REG_TIME), d);
    check(d == echo_cycles(250), $sformatf("continuous 2nd: %0d", d));
    check(ha_ntrig - nt == 3, $sformatf("continuous triggers %0d", ha_ntrig - nt));
    $display("continuous: %0d cycles = %.2f cm", d, cycles_to_cm(d));
    wr(0, ad(SLOT_HA, SR04_REG_MODE), 0);
    wait_ready();
    n_continuous++;
  endtask

  task automatic test_platform_misc();
    word_t d;
    int u0 = n_uart;
    rd(0, ad(SLOT_UART, 3), d);
    check(d == uart_rdata && n_uart > u0, "UART slot read");
    rd(0, ad(3'd6, 0), d);
    check(d == 0, "unused slot reads 0");
    rd(0, ad(SLOT_GPO, 0), d);
    check(d == 0, "GPO read back");
  endtask

  task automatic test_bgcd(input word_t a, input word_t b, input word_t g);
    word_t d;
    wr(4, 0, a);
    wr(4, 1, b);
    wr(4, 2, 1);
    do rd(4, 2, d); while (d[0] == 0);
    rd(4, 3, d);
    check(d == g, $sformatf("binary gcd(%0d,%0d) = %0d", a, b, d));
    n_bgcd++;
  endtask

  task automatic test_fib(input int unsigned n, input word_t f);
    word_t d;
    wr(5, 0, n);
    wr(5, 2, 1);
    do rd(5, 2, d); while (d[0] == 0);
    rd(5, 3, d);
    check(d == f, $sformatf("F(%0d) = %0d", n, d));
    n_fib++;
  endtask

  // p(x) = 2x^3 - x + 7: p(0..3) = 7, 8, 21, 58
  task automatic test_fdiff();
    word_t d;
    int    x = 0;
    word_t init [4] = '{7, 1, 12, 12};
    for (int i = 0; i < 4; i++) begin
      wr(6, 0, i);
      wr(6, 1, init[i]);
    end
    for (int k = 0; k < 5; k++) begin
      int steps = (k == 4) ? 20 : 1;
      wr(6, 2, steps);
      x += steps;
      do rd(6, 2, d); while (d[0] == 0);
      rd(6, 3, d);
      check(d == word_t'(2 * x * x * x - x + 7), $sformatf("p(%0d) = %0d", x, d));
      n_fdiff++;
    end
  endtask

  task automatic test_gcd(input word_t a, input word_t b, input word_t g);
    word_t d;
    wr(1, 0, a);
    wr(1, 1, b);
    wr(1, 2, 1);
    do rd(1, 2, d); while (d[0] == 0);
    rd(1, 3, d);
    check(d == g, $sformatf("gcd(%0d,%0d) = %0d", a, b, d));
    n_gcd++;
  endtask

  task automatic test_fir();
    word_t d;
    int    k [8] = '{3, -1, 4, -1, 5, -9, 2, 6};
    int    x [8];
    int    y;
    for (int i = 0; i < 8; i++) begin
      wr(2, 0, i);
      wr(2, 1, word_t'(k[i]));
      x[i] = 0;
    end
    for (int s = 0; s < 12; s++) begin
      int v = (s * 37 % 200) - 100;
      for (int i = 7; i > 0; i--) x[i] = x[i-1];
      x[0] = v;
      wr(2, 2, word_t'(v));
      do rd(2, 2, d); while (d[0] == 0);
      rd(2, 3, d);
      y = 0;
      for (int i = 0; i < 8; i++) y += k[i] * x[i];
      check($signed(d) == y, $sformatf("filter y=%0d expected %0d", $signed(d), y));
      n_fir++;
    end
  endtask

  task automatic test_ddfs();
    word_t d;
    int    edges = 0;
    int    wmin, wmax;
    logic  prev;
    // 1 MHz square wave: fcw = 2**32 * 1e6 / 1e8
    word_t f = word_t'((64'd1 << 32) / 100);
    wr(3, 0, f);
    rd(3, 0, d);
    check(d == f, "fcw read back");
    prev = ddfs_sq;
    wmin = 255; wmax = 0;
    for (int c = 0; c < 10_000; c++) begin
      @(negedge clk);
      if (ddfs_sq != prev) edges++;
      prev = ddfs_sq;
      if (ddfs_wave < wmin) wmin = ddfs_wave;
      if (ddfs_wave > wmax) wmax = ddfs_wave;
    end
    check(wmin == 0 && wmax == 255, $sformatf("sine samples span %0d..%0d", wmin, wmax));
    // 100 periods in 10000 cycles: 200 edges (+-1 for the phase at start)
    check(edges >= 199 && edges <= 201, $sformatf("DDFS edges %0d", edges));
    n_ddfs++;
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);
    test_platform_misc();
    test_gcd(1071, 462, 21);
    test_gcd(35, 64, 1);
    test_bgcd(1071, 462, 21);
    test_bgcd(96, 64, 32);
    test_fib(10, 55);
    test_fib(47, 32'd2971215073);
    test_fdiff();
    test_fir();
    test_ddfs();
    test_bitbang();
    test_single(100);
    test_single(2);
    test_single(400);
    test_continuous();
    check(n_bitbang > 0, "bit-bang driver ran");
    check(n_timer > 0, "timer advanced");
    check(n_single >= 3, "single measurements");
    check(n_busy_ignored > 0, "start while busy ignored");
    check(n_continuous > 0, "continuous mode");
    check(n_uart > 0, "UART slot");
    check(n_gcd > 0 && n_bgcd > 0 && n_fib > 0 && n_fdiff > 0 && n_fir > 0 && n_ddfs > 0, "accelerators");
    $display("mechanisms: bitbang=%0d single=%0d busy_ignored=%0d continuous=%0d uart=%0d gcd=%0d bgcd=%0d fib=%0d fdiff=%0d fir=%0d ddfs=%0d",
             n_bitbang, n_single, n_busy_ignored, n_continuous, n_uart, n_gcd, n_bgcd, n_fib, n_fdiff, n_fir, n_ddfs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
