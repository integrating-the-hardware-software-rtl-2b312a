// bus_tasks.svh: processor-side bus operations for testbenches. Include it
// inside a module that declares clk, a slot_req_t (or bus_req_t) variable
// named req and a word_t net named rdata. Each operation takes one clock
// cycle. The request is applied at a falling edge, and read data is sampled
// 1 time unit later, which works because read data is combinational.
task automatic bus_wr(input int unsigned a, input logic [31:0] d);
  @(negedge clk);
  req       = '0;
  req.cs    = 1'b1;
  req.wr    = 1'b1;
  req.addr  = a;
  req.wdata = d;
  @(negedge clk);
  req = '0;
endtask

task automatic bus_rd(input int unsigned a, output logic [31:0] d);
  @(negedge clk);
  req      = '0;
  req.cs   = 1'b1;
  req.rd   = 1'b1;
  req.addr = a;
  #1 d = rdata;
  @(negedge clk);
  req = '0;
endtask
