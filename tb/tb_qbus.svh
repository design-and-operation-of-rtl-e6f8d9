// Shared testbench helper: a processor-bus master.  The including module
// declares clk, `qbus_req_t req` and `qbus_rsp_t rsp`, and includes
// tb_util.svh first.

// One bus cycle.  `lat` is the number of clock edges from the start of the
// cycle to the reply; ok = 0 if no reply came within `limit` clocks.
task automatic qb_cycle(input bit wr, input logic [17:0] a, input logic [15:0] wd,
                        output logic [15:0] rd, output bit ok, output int lat,
                        input int limit = 400);
  int n = 0;
  ok = 0;
  rd = '0;
  @(negedge clk);
  req.sync = 1'b1; req.din = !wr; req.dout = wr; req.addr = a; req.wdata = wd;
  while (n < limit) begin
    @(posedge clk); #1;
    n++;
    if (rsp.rply) begin ok = 1; rd = rsp.rdata; break; end
  end
  lat = n;
  @(negedge clk);
  req = '0;
  @(negedge clk);
endtask

task automatic qb_write(input logic [17:0] a, input logic [15:0] wd);
  logic [15:0] rd; bit ok; int lat;
  qb_cycle(1'b1, a, wd, rd, ok, lat);
  check(ok, $sformatf("write %o answered", a));
endtask

task automatic qb_read(input logic [17:0] a, output logic [15:0] rd);
  bit ok; int lat;
  qb_cycle(1'b0, a, 16'h0, rd, ok, lat);
  check(ok, $sformatf("read %o answered", a));
endtask
