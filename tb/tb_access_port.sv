// Testbench for access_port in station 8, with a crate-controller model
// making full CAMAC cycles, the DMA arbiter and 1K of RAM on the bus.
// Checks the document's command list: MAR/MDR load and read, DMA write with
// MAR auto-increment (block load), DMA read started by F17 and by A3 F25,
// the F27 "cycle done" test, Q = 0 while a DMA cycle is still pending, the
// status word, that the DMA request waits for the end of the Dataway cycle,
// processor halt / continue / boot commands, INIT, and reset by C.
module tb_access_port;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  dw_cmd_t dw = DW_CMD_IDLE;
  dw_rsp_t dw_rsp;
  logic dmr, dmg, other_req, other_master, cpu_run = 1, halt_sw = 0, halt, binit, cpu_reset;
  logic cpu_sync = 0;
  qbus_mreq_t mreq;
  qbus_req_t breq;
  qbus_rsp_t rsp;
  logic [1:0] dmg2, oreq2, omas2;
  logic dma_active;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  access_port #(.AP_STATION(8)) dut (
    .clk, .rst, .dw, .dw_rsp, .dmr, .dmg, .mreq, .rsp, .other_req, .other_master,
    .cpu_run, .halt_sw, .halt, .binit, .cpu_reset
  );
  qbus_arbiter #(.NM(2)) u_arb (.clk, .rst, .cpu_sync, .dmr({1'b0, dmr}), .dmg(dmg2), .dma_active,
                                .other_req(oreq2), .other_master(omas2));
  assign dmg = dmg2[0];
  assign other_req = oreq2[0];
  assign other_master = omas2[0];
  always_comb begin
    breq = '0;
    breq.sync = mreq.sync; breq.din = mreq.din; breq.dout = mreq.dout;
    breq.addr = {2'b00, mreq.addr}; breq.wdata = mreq.wdata;
  end
  lsi_ram u_ram (.clk, .rst, .req(breq), .rsp);

  // DMA must not start while the Dataway cycle that asked for it is on
  bit dmr_in_b = 0;
  always @(posedge clk) if (dw.b && dmr && !dma_active) dmr_in_b <= 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; finish_tb();
  end

  // a normal CAMAC cycle as the crate controller makes it
  logic [23:0] cr;
  bit cq, cx;
  task automatic camac(input int aa, input int ff, input logic [23:0] w = 0, input int nn = 8);
    @(negedge clk);
    dw = DW_CMD_IDLE; dw.n = 24'd1 << (nn - 1); dw.a = 4'(aa); dw.f = 5'(ff); dw.w = w; dw.b = 1;
    repeat (4) @(negedge clk);
    dw.s1 = 1; #1; cr = dw_rsp.r; cq = dw_rsp.q; cx = dw_rsp.x;
    repeat (4) @(negedge clk); dw.s1 = 0;
    repeat (4) @(negedge clk); dw.s2 = 1;
    repeat (4) @(negedge clk); dw.s2 = 0;
    repeat (4) @(negedge clk); dw = DW_CMD_IDLE;
  endtask

  logic [15:0] data [8];
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    // block load of 8 words at 1000
    camac(2, 17, 24'o1000); check(cq && cx, "F17 A2 accepted");
    repeat (20) @(negedge clk);
    camac(2, 1); check(cr[15:0] == 16'o1000, "MAR reads back");
    for (int k = 0; k < 8; k++) begin
      data[k] = 16'($urandom);
      camac(3, 16, {8'h0, data[k]}); check(cq, "F16 accepted");
      repeat (20) @(negedge clk);
      camac(4, 27); check(cq, "F27: write cycle done");
    end
    for (int k = 0; k < 8; k++)
      check(u_ram.u_mem.mem[256 + k] == data[k], $sformatf("memory word %0d", k));
    camac(2, 1); check(cr[15:0] == 16'o1020, "MAR incremented by each write");
    // read back: F17 then A3 F25 steps
    camac(2, 17, 24'o1000);
    repeat (20) @(negedge clk);
    camac(3, 0); check(cr[15:0] == data[0], "DMA read started by F17");
    for (int k = 1; k < 8; k++) begin
      camac(3, 25); check(cq, "A3 F25 accepted");
      repeat (20) @(negedge clk);
      camac(3, 0); check(cr[15:0] == data[k], $sformatf("stepped read %0d", k));
    end
    check(!dmr_in_b, "DMA waits for the end of the Dataway cycle");
    // the processor keeps the bus: second command gets Q = 0
    @(negedge clk); cpu_sync = 1;
    camac(3, 16, 24'h1111); check(cq, "first write accepted");
    camac(12, 1); check(cr[0] == 1'b1, "status: DMA in progress");
    camac(4, 27); check(!cq, "F27: not done yet");
    camac(3, 16, 24'h2222); check(!cq, "Q = 0 while the port is busy");
    @(negedge clk); cpu_sync = 0;
    repeat (20) @(negedge clk);
    camac(4, 27); check(cq, "done once the bus is free");
    check(u_ram.u_mem.mem[256 + 7] == 16'h1111, "first write landed, second refused");
    // processor control
    camac(0, 24); check(halt && cx, "F24 halts");
    camac(12, 1); check(cr[2] == 1'b1, "status shows HALT");
    cpu_run = 0;
    camac(0, 25); check(!halt, "F25 continues a halted processor");
    cpu_run = 1;
    fork
      camac(0, 25);
      begin
        bit seen = 0;
        repeat (40) begin @(posedge clk); #1; if (binit) seen = 1; end
        check(seen, "F25 with the processor running pulses INIT");
      end
    join
    camac(0, 24);
    fork
      camac(1, 25);
      begin
        bit seen = 0;
        repeat (40) begin @(posedge clk); #1; if (cpu_reset) seen = 1; end
        check(seen, "A1 F25 pulses RESET (boot)");
      end
    join
    check(!halt, "boot releases HALT");
    halt_sw = 1;
    camac(12, 1); check(cr[2] == 1'b1, "halt switch in the status");
    halt_sw = 0;
    // other station: no X
    camac(3, 0, 0, 9); check(!cx, "other station ignored");
    // C resets MAR
    camac(2, 17, 24'o2000);
    repeat (20) @(negedge clk);
    @(negedge clk); dw = DW_CMD_IDLE; dw.c = 1; dw.b = 1;
    repeat (12) @(negedge clk); dw.s2 = 1; repeat (4) @(negedge clk); dw = DW_CMD_IDLE;
    camac(2, 1); check(cr[15:0] == 16'o0, "C clears MAR");
    finish_tb();
  end
endmodule
