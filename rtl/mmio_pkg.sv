// mmio_pkg: types and constants shared by the memory-mapped I/O side of the
// platform.
//
// The processor reaches every I/O core through one simple synchronous bus. A
// request is a packed struct: a slot select (cs), write and read strobes, a
// word address and 32 bits of write data. A write takes effect at the clock
// edge where cs and wr are both high. Read data is combinational: it is valid
// in the same cycle as cs and rd. Its source is a register inside the addressed
// core. The document names the bus and its memory-mapped registers but not its
// signals, so the field names, widths and timing are this design's choice.
package mmio_pkg;

  localparam int unsigned DATA_W   = 32;  // int-sized registers (io_rd/io_wr use int)
  localparam int unsigned REG_AW   = 5;   // word address inside one slot: 32 registers
  localparam int unsigned SLOT_AW  = 3;   // number of slot-select bits: 8 slots
  localparam int unsigned BUS_AW   = SLOT_AW + REG_AW;

  typedef logic [DATA_W-1:0] word_t;

  // Request as seen by one core, after slot decoding.
  typedef struct packed {
    logic              cs;
    logic              wr;
    logic              rd;
    logic [REG_AW-1:0] addr;
    word_t             wdata;
  } slot_req_t;

  // Request as issued by the processor on the I/O interconnect.
  typedef struct packed {
    logic              cs;
    logic              wr;
    logic              rd;
    logic [BUS_AW-1:0] addr;
    word_t             wdata;
  } bus_req_t;

  // Slot map of the predesigned platform.
  localparam logic [SLOT_AW-1:0] SLOT_TIMER = 3'd0;
  localparam logic [SLOT_AW-1:0] SLOT_UART  = 3'd1;
  localparam logic [SLOT_AW-1:0] SLOT_GPI   = 3'd2;
  localparam logic [SLOT_AW-1:0] SLOT_GPO   = 3'd3;
  localparam logic [SLOT_AW-1:0] SLOT_HA    = 3'd4;

  // Register numbers of the SR04 core (one sensor); sensor i uses 4*i + n.
  localparam int unsigned SR04_REG_MODE  = 0;  // write: 1 = continuous, 0 = single
  localparam int unsigned SR04_REG_START = 1;  // write: start one measurement
  localparam int unsigned SR04_REG_READY = 2;  // read: 1 = controller idle
  localparam int unsigned SR04_REG_TIME  = 3;  // read: echo time in clock cycles

endpackage
