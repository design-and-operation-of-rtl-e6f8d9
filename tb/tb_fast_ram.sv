// Testbench for fast_ram: boards at 004000 (page 0, low) and 314000
// (page 1, high, last 1K) from the document's switch table; data round trip,
// the 4-clock (200-ns) reply and the address decoding.
module tb_fast_ram;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp, rsp_a, rsp_b;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  fast_ram #(.SW(5'b00001)) dut_a (.clk, .rst, .req, .rsp(rsp_a));
  fast_ram #(.SW(5'b01111)) dut_b (.clk, .rst, .req, .rsp(rsp_b));
  assign rsp = rsp_a | rsp_b;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [15:0] rd;
  bit ok; int lat;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    qb_write(18'o004000, 16'h1357);
    qb_write(18'o007776, 16'h2468);
    qb_write(18'o314000, 16'h9abc);
    qb_cycle(1'b0, 18'o004000, 16'h0, rd, ok, lat);
    check(ok && rd == 16'h1357, "page 0 first word");
    check(lat == 4, $sformatf("reply after %0d clocks, 200 ns expected", lat));
    qb_read(18'o007776, rd); check(rd == 16'h2468, "page 0 last word");
    qb_read(18'o314000, rd); check(rd == 16'h9abc, "page 1 high");
    qb_cycle(1'b0, 18'o010000, 16'h0, rd, ok, lat, 30); check(!ok, "010000 outside");
    qb_cycle(1'b0, 18'o024000, 16'h0, rd, ok, lat, 30); check(!ok, "bit 13 set is outside");
    qb_cycle(1'b0, 18'o104000, 16'h0, rd, ok, lat, 30); check(!ok, "high half of page 0 outside");
    finish_tb();
  end
endmodule
