// Testbench for lsi_prom: reads the words loaded from a hex file at
// 170000-170006, checks that writes do not change them, that the boot
// location 173000 is inside the PROM, and that page 1 is not answered.
module tb_lsi_prom;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  lsi_prom #(.INIT_FILE("tb/lsi_prom_init.hex")) dut (.clk, .rst, .req, .rsp);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [15:0] rd;
  bit ok; int lat;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    qb_read(18'o170000, rd); check(rd == 16'h1111, "word 0");
    qb_read(18'o170002, rd); check(rd == 16'h2222, "word 1");
    qb_read(18'o170006, rd); check(rd == 16'h4444, "word 3");
    qb_write(18'o170002, 16'h5555);
    qb_read(18'o170002, rd); check(rd == 16'h2222, "read only");
    qb_cycle(1'b0, 18'o173000, 16'h0, rd, ok, lat, 30);
    check(ok && rd == 16'h0, "boot address inside PROM");
    qb_cycle(1'b0, 18'o174000, 16'h0, rd, ok, lat, 30);
    check(!ok, "174000 not answered");
    qb_cycle(1'b0, 18'o370000, 16'h0, rd, ok, lat, 30);
    check(!ok, "page 1 not answered");
    finish_tb();
  end
endmodule
