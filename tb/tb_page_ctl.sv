// Testbench for page_ctl: the page control register at 177570 answers on
// every page, holds the two page bits (0-1) and CIE (bit 6), reads back
// exactly those bits, ignores the others and clears on reset.
module tb_page_ctl;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp;
  logic [1:0] page;
  logic cie;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  page_ctl dut (.clk, .rst, .req, .rsp, .page, .cie);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [15:0] rd, v;
  bit ok; int lat;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    check(page == 2'b00 && cie == 1'b0, "reset state");
    for (int k = 0; k < 20; k++) begin
      v = 16'($urandom);
      qb_write({2'(k), 16'o177570}, v);
      check(page == v[1:0] && cie == v[6], "register outputs follow write");
      qb_cycle(1'b0, {2'(k + 1), 16'o177570}, 16'h0, rd, ok, lat);
      check(ok && rd == {9'b0, v[6], 4'b0, v[1:0]}, $sformatf("readback %o of %o", rd, v));
      check(lat == 1, "one-clock reply");
    end
    qb_cycle(1'b0, 18'o177572, 16'h0, rd, ok, lat, 30);
    check(!ok, "177572 not answered");
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    check(page == 2'b00 && cie == 1'b0, "reset clears");
    finish_tb();
  end
endmodule
