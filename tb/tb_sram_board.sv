// Testbench for sram_board: two boards, one set to 4K words at 100000 and
// one to 8K words at 200000 (switch 5 ignored), checked against the
// document's switch tables: data written is read back, the reply takes
// 11 clocks (550 ns), and addresses just outside each board get no reply.
module tb_sram_board;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp, rsp4, rsp8;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  sram_board #(.SW(6'b00100_1)) dut4 (.clk, .rst, .req, .rsp(rsp4));  // 4K at 100000
  sram_board #(.SW(6'b01001_0)) dut8 (.clk, .rst, .req, .rsp(rsp8));  // 8K at 200000
  assign rsp = rsp4 | rsp8;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [15:0] rd;
  bit ok; int lat;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    qb_write(18'o100000, 16'h0101);
    qb_write(18'o117776, 16'h0202);
    qb_write(18'o200000, 16'h0303);
    qb_write(18'o237776, 16'h0404);
    qb_write(18'o220000, 16'h0505);
    qb_cycle(1'b0, 18'o100000, 16'h0, rd, ok, lat);
    check(ok && rd == 16'h0101, "4K first word");
    check(lat == 11, $sformatf("reply after %0d clocks, 550 ns expected", lat));
    qb_read(18'o117776, rd); check(rd == 16'h0202, "4K last word");
    qb_read(18'o200000, rd); check(rd == 16'h0303, "8K first word");
    qb_read(18'o237776, rd); check(rd == 16'h0404, "8K last word");
    qb_read(18'o220000, rd); check(rd == 16'h0505, "8K upper half distinct");
    qb_cycle(1'b0, 18'o120000, 16'h0, rd, ok, lat, 30); check(!ok, "120000 outside 4K board");
    qb_cycle(1'b0, 18'o240000, 16'h0, rd, ok, lat, 30); check(!ok, "240000 outside 8K board");
    qb_cycle(1'b0, 18'o076000, 16'h0, rd, ok, lat, 30); check(!ok, "076000 outside");
    finish_tb();
  end
endmodule
