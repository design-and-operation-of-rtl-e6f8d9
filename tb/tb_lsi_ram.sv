// Testbench for lsi_ram: writes and reads across the 1K words at 0-3776 on
// page 0, checks the reply latency, that other pages and addresses get no
// reply, and that the disable switch removes the memory.
module tb_lsi_ram;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp, rsp_off, rsp_on;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  lsi_ram #(.LATENCY(6)) dut (.clk, .rst, .req, .rsp(rsp_on));
  lsi_ram #(.ENABLE(1'b0)) dut_off (.clk, .rst, .req, .rsp(rsp_off));
  assign rsp = rsp_on | rsp_off;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [15:0] rd, model [1024];
  bit ok; int lat;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int k = 0; k < 1024; k += 37) begin
      model[k] = 16'(k * 16'o1234 + 7);
      qb_write(18'(2 * k), model[k]);
    end
    for (int k = 0; k < 1024; k += 37) begin
      qb_cycle(1'b0, 18'(2 * k), 16'h0, rd, ok, lat);
      check(ok && rd == model[k], $sformatf("word %0d = %h expected %h", k, rd, model[k]));
      check(lat == 6, $sformatf("latency %0d", lat));
    end
    qb_write(18'o3776, 16'hBEEF);
    qb_read(18'o3776, rd);
    check(rd == 16'hBEEF, "top word");
    // not on page 1, not at 4000
    qb_cycle(1'b0, 18'o203776, 16'h0, rd, ok, lat, 30);
    check(!ok, "page 1 not answered");
    qb_cycle(1'b0, 18'o004000, 16'h0, rd, ok, lat, 30);
    check(!ok, "004000 not answered");
    finish_tb();
  end
endmodule
