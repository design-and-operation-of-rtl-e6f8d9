// Testbench for prom_board: a 4K board at 040000 and an 8K board at 400000
// loaded from a hex file; checks the contents, the read-only behaviour, the
// 450-ns (9-clock) cycle and the address decoding of the switch tables.
module tb_prom_board;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp, rsp4, rsp8;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  prom_board #(.SW(6'b00010_1), .INIT_FILE("tb/prom_board_init.hex")) dut4 (.clk, .rst, .req, .rsp(rsp4));
  prom_board #(.SW(6'b10001_0), .INIT_FILE("tb/prom_board_init.hex")) dut8 (.clk, .rst, .req, .rsp(rsp8));
  assign rsp = rsp4 | rsp8;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [15:0] rd;
  bit ok; int lat;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    qb_cycle(1'b0, 18'o040000, 16'h0, rd, ok, lat);
    check(ok && rd == 16'hA001, "4K word 0");
    check(lat == 9, $sformatf("450-ns latency %0d", lat));
    qb_read(18'o040004, rd); check(rd == 16'hA003, "4K word 2");
    qb_write(18'o040004, 16'h1234);
    qb_read(18'o040004, rd); check(rd == 16'hA003, "read only");
    qb_read(18'o400002, rd); check(rd == 16'hA002, "8K word 1 at 400002");
    qb_read(18'o437776, rd); check(rd == 16'h0000, "8K last word");
    qb_cycle(1'b0, 18'o060000, 16'h0, rd, ok, lat, 30); check(!ok, "060000 outside 4K board");
    qb_cycle(1'b0, 18'o440000, 16'h0, rd, ok, lat, 30); check(!ok, "440000 outside 8K board");
    finish_tb();
  end
endmodule
