// Testbench for qbus_arbiter: one-clock grant, fixed priority (master 0
// first), no grant while the processor has a bus cycle open, the grant held
// until its master drops the request, and the other_req / other_master
// reports, checked against a reference model on random requests.
module tb_qbus_arbiter;
  logic clk = 0, rst = 1;
  logic cpu_sync = 0;
  logic [1:0] dmr = 0, dmg, other_req, other_master;
  logic dma_active;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  qbus_arbiter #(.NM(2)) dut (.clk, .rst, .cpu_sync, .dmr, .dmg, .dma_active, .other_req, .other_master);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [1:0] m_dmg;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // directed: both request together, 0 wins; 1 follows when 0 drops
    dmr = 2'b11;
    @(posedge clk); #1; check(dmg == 2'b01, "priority to master 0 after one clock");
    repeat (5) @(posedge clk); #1; check(dmg == 2'b01, "grant held");
    check(other_req == 2'b11 && other_master[1] && !other_master[0], "master 1 sees the other master");
    @(negedge clk); dmr = 2'b10;
    @(posedge clk); #1; check(dmg == 2'b00, "release");
    @(posedge clk); #1; check(dmg == 2'b10, "master 1 granted next");
    @(negedge clk); dmr = 2'b00;
    @(posedge clk); #1;
    @(negedge clk); cpu_sync = 1; dmr = 2'b01;
    repeat (4) @(posedge clk); #1; check(dmg == 2'b00, "no grant during a processor cycle");
    @(negedge clk); cpu_sync = 0;
    @(posedge clk); #1; check(dmg == 2'b01, "grant when the processor cycle ends");
    @(negedge clk); dmr = 0;
    @(posedge clk);
    // random against a model
    m_dmg = 0;
    @(negedge clk);
    m_dmg = dmg;
    repeat (3000) begin
      dmr = 2'($urandom); cpu_sync = ($urandom % 4) == 0;
      @(posedge clk);
      if (m_dmg != 0) begin if ((m_dmg & dmr) == 0) m_dmg = 0; end
      else if (!cpu_sync) begin if (dmr[0]) m_dmg = 2'b01; else if (dmr[1]) m_dmg = 2'b10; end
      #1;
      check(dmg == m_dmg, "grant matches model");
      check(dma_active == (dmg != 0), "dma_active");
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
