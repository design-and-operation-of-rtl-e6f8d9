// Testbench for spu with the test microprograms of spu_ucode.hex in its
// control memory, a fast (50-ns) RAM at 004000 and a 200-ns RAM at 100000 on
// the bus, the DMA arbiter and a processor model.  The processor writes the
// parameter RAM (start address, word count, result address) and the CSR
// (start vector, EF); the SPU takes the bus, reads and sums the words,
// writes the sum and clears EF.  Checks: the sum (worked out here), EF
// running/done in the CSR, that the processor's own cycles are held off
// while the SPU owns the bus, that Test Inhibit freezes the SPU, the
// special-LAM test condition, and the SPU clock period (3 clocks = 150 ns).
// Prints SPU cycles per word for both memories.
module tb_spu;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0, bus;
  qbus_rsp_t rsp, brsp, r_spu, r_fast, r_sram;
  logic dmr, dmg, dma_active, spu_ce, ef_out, stack_full, test_inhibit = 0;
  logic [1:0] dmg2, oreq, omas;
  qbus_mreq_t mreq;
  logic [5:0] sl = 0;
  logic [10:0] cm_addr;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  spu #(.INIT_FILE("tb/spu_ucode.hex")) dut (
    .clk, .rst, .req(bus), .rsp(r_spu), .dmr, .dmg, .mreq, .mrsp(brsp), .sl, .cm_addr,
    .cm_ext_en(1'b0), .cm_ext_data(40'h0), .test_inhibit, .spu_ce, .ef_out, .stack_full
  );
  qbus_arbiter #(.NM(2)) u_arb (.clk, .rst, .cpu_sync(req.sync), .dmr({dmr, 1'b0}), .dmg(dmg2),
                                .dma_active, .other_req(oreq), .other_master(omas));
  assign dmg = dmg2[1];
  fast_ram   #(.SW(5'b00001))    u_fast (.clk, .rst, .req(bus), .rsp(r_fast));
  sram_board #(.SW(6'b00100_1))  u_sram (.clk, .rst, .req(bus), .rsp(r_sram));

  // processor cycles wait while a DMA master holds the bus
  always_comb begin
    if (dma_active) begin
      bus = '0;
      bus.sync = mreq.sync; bus.din = mreq.din; bus.dout = mreq.dout;
      bus.addr = {2'b00, mreq.addr}; bus.wdata = mreq.wdata;
    end else bus = req;
  end
  assign brsp = r_spu | r_fast | r_sram;
  // the processor sees replies only to its own cycles
  assign rsp = dma_active ? QBUS_RSP_IDLE : brsp;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; finish_tb();
  end

  localparam logic [17:0] CSR = 18'o174000;
  localparam logic [17:0] PRAM = 18'o174040;

  // SPU clock period
  int ce_gap = 0, last_ce = -1, nclk = 0;
  always @(posedge clk) begin
    nclk <= nclk + 1;
    if (spu_ce) begin
      if (last_ce >= 0) ce_gap <= nclk - last_ce;
      last_ce <= nclk;
    end
  end
  int nce = 0, ef_start = 0, last_run = 0;
  bit ef_q = 0;
  always @(posedge clk) begin
    if (spu_ce) nce <= nce + 1;
    ef_q <= ef_out;
    if (ef_out && !ef_q) ef_start <= nce;
    if (!ef_out && ef_q) last_run <= nce - ef_start;
  end

  logic [15:0] rd, sum;
  int t0, t1, nwords;
  task automatic run_sum(input logic [15:0] base, input int n, input logic [15:0] dst, output int spu_cycles);
    logic [15:0] v;
    bit ok;
    int lat;
    sum = 0;
    for (int k = 0; k < n; k++) begin
      v = 16'($urandom);
      qb_write({2'b00, base + 16'(2 * k)}, v);
      sum += v;
    end
    qb_write(PRAM + 0, base);
    qb_write(PRAM + 2, 16'(n));
    qb_write(PRAM + 4, dst);
    qb_write(CSR, 16'h8000 | 16'd16);
    rd = 1;
    for (int k = 0; k < 2000 && rd[0]; k++) begin
      qb_cycle(1'b0, CSR, 16'h0, rd, ok, lat, 40000);
      if (!ok) rd = 1;
    end
    spu_cycles = last_run;
    check(!rd[0], "EF clear when the routine is done");
    qb_read({2'b00, dst}, rd);
    check(rd == sum, $sformatf("sum of %0d words: %h expected %h", n, rd, sum));
  endtask

  int c4, c20, cs4, cs20, held;
  bit ok; int lat;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (10) @(posedge clk);
    check(ce_gap == 3, $sformatf("SPU clock every %0d clocks (150 ns)", ce_gap));
    qb_read(CSR, rd); check(rd[0] == 0, "idle after reset");
    // parameter RAM is write-only from the processor side: reads give 0
    run_sum(16'o004000, 4, 16'o004100, c4);
    run_sum(16'o004000, 20, 16'o004100, c20);
    run_sum(16'o100000, 4, 16'o100200, cs4);
    run_sum(16'o100000, 20, 16'o100200, cs20);
    $display("SPU cycles per word read: fast RAM %0d, 200-ns RAM %0d",
             (c20 - c4) / 16, (cs20 - cs4) / 16);
    check((c20 - c4) % 16 == 0 && (cs20 - cs4) % 16 == 0, "constant cycles per word");
    check((cs20 - cs4) > (c20 - c4), "slower memory costs more SPU cycles");
    // processor held off during the SPU's hold of the bus
    qb_write(PRAM + 0, 16'o004000);
    qb_write(PRAM + 2, 16'd200);
    qb_write(PRAM + 4, 16'o004100);
    qb_write(CSR, 16'h8000 | 16'd16);
    repeat (30) @(posedge clk);
    qb_cycle(1'b0, CSR, 16'h0, rd, ok, lat, 40000);
    check(ok && lat > 40, $sformatf("processor cycle waited %0d clocks for the bus", lat));
    // test inhibit freezes the SPU
    @(negedge clk); test_inhibit = 1;
    held = cm_addr;
    repeat (50) @(posedge clk);
    check(cm_addr == 11'(held) && !spu_ce, "Test Inhibit stops the SPU");
    @(negedge clk); test_inhibit = 0;
    rd = 1;
    for (int k = 0; k < 5000 && rd[0]; k++) begin
      qb_cycle(1'b0, CSR, 16'h0, rd, ok, lat, 40000);
      if (!ok) rd = 1;
    end
    check(!rd[0], "long run finishes");
    // special LAM 1 test condition
    qb_write(CSR, 16'h8000 | 16'd40);
    repeat (100) @(posedge clk);
    qb_read(CSR, rd); check(rd[0], "waits for special LAM 1");
    sl = 6'b000010;
    repeat (100) @(posedge clk);
    qb_read(CSR, rd); check(rd[0], "special LAM 2 does not end the wait");
    sl = 6'b000001;
    repeat (100) @(posedge clk);
    qb_read(CSR, rd); check(!rd[0], "special LAM 1 ends the wait");
    check(!stack_full, "stack not used");
    finish_tb();
  end
endmodule
