// End-to-end testbench of acc_top at its full, default size (20-MHz clock,
// real clock dividers and baud rates).  Around the controller it places a
// processor model driving the processor bus, a crate-controller model
// making CAMAC cycles on the Dataway, a model CAMAC module in station 5
// (24-bit register: F0 read, F16 write, F25 counts, Z and C clear it) and
// the LAM lines of the other stations.
//
// The run: boot and halt control through the Access Port; block load and
// read-back of memory by Access Port DMA; loading the SPU microprogram into
// the PROM simulator byte by byte over the Dataway; the processor driving
// CAMAC through the Control Port in normal, short and multi-cycle modes,
// with Z and C; LAM interrupts with their vectors; the SPU summing memory
// (the processor stalls while the SPU holds the bus), reading a CAMAC
// module through the Control Port, and waiting on a special LAM; the
// terminal port in loop-back; the clock interrupt.  Each mechanism is
// counted and a mechanism that never happened is a failure.  SPU cycle
// counts per access are printed beside the document's table.
module tb_acc_top;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_mreq_t cpu_mreq = QBUS_MREQ_IDLE;
  qbus_rsp_t  cpu_rsp, bus_rsp;
  qbus_req_t  bus_req;
  logic dma_active, cpu_run = 1, halt_sw = 0, halt, cpu_reset, binit;
  logic irq_lam, irq_rx, evnt;
  logic [8:0] vec_lam;
  logic [3:0] baud_sw = 4'b1110;
  logic rxd, txd, clk_sel_1khz = 1;
  dw_cmd_t cc_cmd = DW_CMD_IDLE, dw;
  dw_rsp_t cc_rsp, ext_rsp;
  logic [23:0] ext_lam = 0, lam;
  logic acb_req, acb_grant, acb_acl = 0, cp_sw4_open = 1;
  logic [5:0] spu_lam;
  logic spu_ef, spu_ce, spu_stack_full, sim_access_mode;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  acc_top dut (
    .clk, .rst, .cpu_mreq, .cpu_rsp, .dma_active, .cpu_run, .halt_sw, .halt, .cpu_reset, .binit,
    .irq_lam, .vec_lam, .irq_rx, .evnt, .baud_sw, .rxd, .txd, .clk_sel_1khz,
    .cc_cmd, .cc_rsp, .dw, .ext_rsp, .ext_lam, .lam, .acb_req, .acb_grant, .acb_acl,
    .cp_sw4_open, .spu_lam, .spu_ef, .spu_ce, .spu_stack_full, .sim_access_mode, .bus_req, .bus_rsp
  );
  assign rxd = txd;   // terminal loop-back plug

  // ---------------- mechanism counters ----------------
  typedef enum int { M_BOOT, M_HALT, M_INIT, M_DMA_WR, M_DMA_RD, M_UCODE, M_NORMAL, M_SHORT, M_MULTI,
                     M_Z, M_C, M_LAM_IRQ, M_SPU_RUN, M_SPU_CAMAC, M_SPU_LAM, M_STALL, M_TERM,
                     M_CLOCK, M_PAGE, M_INHIBIT, M_NMECH } mech_e;
  int mech [M_NMECH];
  initial foreach (mech[k]) mech[k] = 0;

  // ---------------- crate controller and Auxiliary Controller Bus ----------------
  bit cc_busy = 0;
  always_ff @(posedge clk) acb_grant <= acb_req && !cc_busy;

  logic [23:0] cr;
  bit cq, cx;
  task automatic camac(input int nn, input int aa, input int ff, input logic [23:0] w = 0);
    @(negedge clk);
    while (dw.b) @(negedge clk);       // Dataway in use by the Control Port
    cc_busy = 1;
    @(negedge clk);
    cc_cmd = DW_CMD_IDLE; cc_cmd.n = 24'd1 << (nn - 1); cc_cmd.a = 4'(aa); cc_cmd.f = 5'(ff);
    cc_cmd.w = w; cc_cmd.b = 1;
    repeat (4) @(negedge clk);
    cc_cmd.s1 = 1; #1; cr = cc_rsp.r; cq = cc_rsp.q; cx = cc_rsp.x;
    repeat (4) @(negedge clk); cc_cmd.s1 = 0;
    repeat (4) @(negedge clk); cc_cmd.s2 = 1;
    repeat (4) @(negedge clk); cc_cmd.s2 = 0;
    repeat (4) @(negedge clk); cc_cmd = DW_CMD_IDLE; cc_busy = 0;
  endtask

  // ---------------- model module in station 5 ----------------
  logic [23:0] sreg = 0;
  int n_f25 = 0, n_z = 0, n_c = 0;
  bit s1_q = 0, s2_q = 0;
  always_comb begin
    ext_rsp = DW_RSP_IDLE;
    if (dw.n[4]) begin
      ext_rsp.x = 1'b1;
      ext_rsp.q = 1'b1;
      if (dw.f == 5'd0) ext_rsp.r = sreg;
    end
  end
  always @(posedge clk) begin
    s1_q <= dw.s1; s2_q <= dw.s2;
    if (dw.s1 && !s1_q && dw.n[4] && dw.f == 5'd16) sreg <= dw.w;
    if (dw.s2 && !s2_q && dw.n[4] && dw.f == 5'd25) n_f25 <= n_f25 + 1;
    if (dw.s2 && !s2_q && dw.z) begin sreg <= 0; n_z <= n_z + 1; end
    if (dw.s2 && !s2_q && dw.c) begin sreg <= 0; n_c <= n_c + 1; end
  end

  // ---------------- processor model ----------------
  task automatic cpu_cycle(input bit wr, input logic [15:0] a, input logic [15:0] wd,
                           output logic [15:0] rd, output int lat);
    int n = 0;
    rd = 0;
    @(negedge clk);
    cpu_mreq.sync = 1; cpu_mreq.din = !wr; cpu_mreq.dout = wr; cpu_mreq.addr = a; cpu_mreq.wdata = wd;
    while (n < 200000) begin
      @(posedge clk); #1; n++;
      if (cpu_rsp.rply) begin rd = cpu_rsp.rdata; break; end
    end
    check(n < 200000, $sformatf("processor cycle at %o answered", a));
    lat = n;
    @(negedge clk); cpu_mreq = QBUS_MREQ_IDLE;
    @(negedge clk);
  endtask
  task automatic cpu_wr(input logic [15:0] a, input logic [15:0] wd);
    logic [15:0] rd; int lat;
    cpu_cycle(1, a, wd, rd, lat);
  endtask
  task automatic cpu_rd(input logic [15:0] a, output logic [15:0] rd);
    int lat;
    cpu_cycle(0, a, 16'h0, rd, lat);
  endtask

  function automatic logic [15:0] naf(input int nn, input int aa, input int ff);
    return {2'b11, 5'(nn), 4'(aa), 4'(ff & 15), 1'b0};
  endfunction

  // ---------------- SPU observation ----------------
  int nce = 0, ef_start = 0, last_run = 0;
  bit ef_q = 0;
  always @(posedge clk) begin
    if (spu_ce) nce <= nce + 1;
    ef_q <= spu_ef;
    if (spu_ef && !ef_q) ef_start <= nce;
    if (!spu_ef && ef_q) last_run <= nce - ef_start;
  end

  localparam logic [15:0] SPU_CSR = 16'o174000, SPU_PRAM = 16'o174040;
  localparam logic [15:0] CP_STAT = 16'o140000, CP_HOLD = 16'o140002;

  task automatic spu_run(input logic [15:0] vec, output int cycles);
    logic [15:0] rd;
    cpu_wr(SPU_CSR, 16'h8000 | vec);
    rd = 1;
    for (int k = 0; k < 1000 && rd[0]; k++) cpu_rd(SPU_CSR, rd);
    check(!rd[0], "SPU routine finished");
    cycles = last_run;
  endtask

  // one-word sum routine at address `a`: SPU cycles of the whole routine
  task automatic spu_one(input logic [15:0] a, output int cycles, output logic [15:0] got);
    cpu_wr(SPU_PRAM + 0, a);
    cpu_wr(SPU_PRAM + 2, 16'd1);
    cpu_wr(SPU_PRAM + 4, 16'o004200);
    spu_run(16'd16, cycles);
    cpu_rd(16'o004200, got);
  endtask

  // SPU microprogram, loaded over the Dataway into the PROM simulator
  logic [39:0] ucode [44];
  initial $readmemh("tb/spu_ucode.hex", ucode);

  // clock events
  int n_evnt = 0, t_ev = -1, ev_gap = 0, nclk = 0;
  always @(posedge clk) begin
    nclk <= nclk + 1;
    if (evnt) begin n_evnt <= n_evnt + 1; if (t_ev >= 0) ev_gap <= nclk - t_ev; t_ev <= nclk; end
  end

  // multi-cycle Busy monitor
  int b_fall = 0;
  bit b_q = 0;
  always @(posedge clk) begin b_q <= dw.b; if (b_q && !dw.b) b_fall <= b_fall + 1; end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog");
    failures++; finish_tb();
  end

  logic [15:0] rd, sum, v, dmaw [8];
  logic [23:0] v24;
  int lat, lat_norm, lat_short, c_fast, c_sram, c_cam_n, c_cam_s, f0, bf;
  bit seen;
  initial begin
    repeat (5) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);

    // ---- halt and boot through the Access Port (station 8) ----
    camac(8, 0, 24); check(halt && cx, "AP F24 halts the processor");
    if (halt) mech[M_HALT]++;
    camac(8, 12, 1); check(cr[2], "AP status shows HALT");
    seen = 0;
    fork
      camac(8, 1, 25);
      repeat (40) begin @(posedge clk); #1; if (cpu_reset) seen = 1; end
    join
    check(seen && !halt, "AP A1 F25 boots the processor");
    if (seen) mech[M_BOOT]++;

    // ---- Access Port DMA: block load into the 200-ns RAM, read back ----
    camac(8, 2, 17, 24'o100000);
    repeat (30) @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      dmaw[k] = 16'($urandom);
      camac(8, 3, 16, {8'h0, dmaw[k]}); check(cq, "AP write accepted");
      repeat (30) @(negedge clk);
      camac(8, 4, 27); if (cq) mech[M_DMA_WR]++;
    end
    for (int k = 0; k < 8; k++) begin
      cpu_rd(16'o100000 + 16'(2 * k), rd);
      check(rd == dmaw[k], $sformatf("DMA-loaded word %0d seen by the processor", k));
    end
    cpu_wr(16'o100020, 16'h5A5A);
    camac(8, 2, 17, 24'o100020);
    repeat (30) @(negedge clk);
    camac(8, 3, 0); check(cr[15:0] == 16'h5A5A, "AP DMA read of a processor-written word");
    if (cr[15:0] == 16'h5A5A) mech[M_DMA_RD]++;

    // ---- SPU microprogram into the PROM simulator (station 10) ----
    for (int b = 0; b < 5; b++) begin
      camac(10, 0, 16, 24'(b << 9));
      for (int j = 0; j < 44; j++) camac(10, 1, 16, {16'h0, ucode[j][8*b +: 8]});
    end
    camac(10, 0, 0); check(!sim_access_mode, "simulator back in SPU mode");
    seen = 1;
    for (int j = 0; j < 44; j++) if (dut.u_sim.ram[j] != ucode[j]) seen = 0;
    check(seen, "microprogram loaded over the Dataway");
    if (seen) mech[M_UCODE]++;

    // ---- Control Port: normal cycles, 24-bit data ----
    v24 = 24'($urandom);
    cpu_wr(CP_HOLD, {8'h0, v24[23:16]});
    cpu_cycle(1, naf(5, 0, 16), v24[15:0], rd, lat_norm);
    check(sreg == v24, "24-bit CAMAC write");
    cpu_cycle(0, naf(5, 0, 0), 0, rd, lat);
    check(rd == v24[15:0], "CAMAC read R16-R1");
    cpu_rd(CP_HOLD, rd); check(rd[7:0] == v24[23:16], "R24-R17 holding register");
    cpu_rd(CP_STAT, rd); check(rd[1:0] == 2'b11, "Q and X in the status");
    if (sreg == v24) mech[M_NORMAL]++;
    // short cycles
    cpu_wr(CP_STAT, 16'o100);
    v24 = 24'($urandom);
    cpu_wr(CP_HOLD, {8'h0, v24[23:16]});
    cpu_cycle(1, naf(5, 0, 16), v24[15:0], rd, lat_short);
    check(sreg == v24, "short-cycle write");
    check(lat_norm - lat_short == 13, $sformatf("processor sees %0d clocks normal, %0d short", lat_norm, lat_short));
    if (sreg == v24 && lat_short < lat_norm) mech[M_SHORT]++;
    // multi-cycle
    cpu_wr(CP_STAT, 16'o040);
    bf = b_fall; f0 = n_f25;
    repeat (3) cpu_wr(naf(5, 0, 25), 0);
    check(n_f25 == f0 + 3 && b_fall == bf && dw.b, "three cycles under one Busy");
    if (n_f25 == f0 + 3 && b_fall == bf) mech[M_MULTI]++;
    cpu_wr(CP_STAT, 16'o000);
    // Z and C
    cpu_wr(CP_STAT, 16'o004);
    check(sreg == 0 && n_z == 1, "Z cycle clears the module");
    if (n_z == 1) mech[M_Z]++;
    sreg = 24'h00ABCD;
    cpu_wr(CP_STAT, 16'o010);
    check(sreg == 0 && n_c == 1, "C cycle");
    if (n_c == 1) mech[M_C]++;
    // Inhibit held by the processor
    cpu_wr(CP_STAT, 16'o020);
    if (dw.i) mech[M_INHIBIT]++;
    cpu_rd(CP_STAT, rd); check(rd[4], "I* reads the Inhibit line");
    cpu_wr(CP_STAT, 16'o000);

    // ---- LAM interrupt: L3 -> code 21 -> vector 524 ----
    cpu_wr(CP_STAT, 16'o200);                         // EI1
    cpu_wr(16'o140200 + 16'(2 * 21), 16'o002);
    cpu_wr(16'o140200 + 16'(2 * 2), 16'o002);
    ext_lam[2] = 1;
    repeat (2) @(posedge clk); #1;
    check(irq_lam && vec_lam == 9'o524, $sformatf("L3 interrupt, vector %o", vec_lam));
    if (irq_lam && vec_lam == 9'o524) mech[M_LAM_IRQ]++;
    ext_lam[2] = 0;
    // the port's own LAM source on its station (22)
    cpu_wr(CP_STAT, 16'o201);
    camac(22, 0, 26);
    repeat (2) @(posedge clk); #1;
    check(lam[21] && irq_lam && vec_lam == 9'o410, "the port's own LAM on L22, vector 410");
    camac(22, 0, 10);

    // ---- SPU: sums over memory, with the processor stalled meanwhile ----
    sum = 0;
    for (int k = 0; k < 16; k++) begin v = 16'($urandom); cpu_wr(16'o004000 + 16'(2 * k), v); sum += v; end
    cpu_wr(SPU_PRAM + 0, 16'o004000);
    cpu_wr(SPU_PRAM + 2, 16'd16);
    cpu_wr(SPU_PRAM + 4, 16'o004100);
    cpu_wr(SPU_CSR, 16'h8000 | 16'd16);
    wait (dma_active);
    cpu_cycle(0, 16'o004100, 0, rd, lat);              // waits for the SPU to let go
    if (lat > 20) mech[M_STALL]++;
    check(lat > 20, $sformatf("processor stalled %0d clocks while the SPU held the bus", lat));
    check(rd == sum, $sformatf("SPU sum %h expected %h", rd, sum));
    if (rd == sum) mech[M_SPU_RUN]++;
    // SPU cycles for one access to each kind of memory
    spu_one(16'o004000, c_fast, rd);
    cpu_wr(16'o100000, 16'h1234);
    spu_one(16'o100000, c_sram, rd); check(rd == 16'h1234, "SPU read of the 200-ns RAM");
    sreg = 24'h00BEEF;
    spu_one(naf(5, 0, 0), c_cam_n, rd);
    check(rd == 16'hBEEF, "SPU reads the CAMAC module through the Control Port");
    if (rd == 16'hBEEF) mech[M_SPU_CAMAC]++;
    cpu_wr(CP_STAT, 16'o100);
    spu_one(naf(5, 0, 0), c_cam_s, rd);
    check(rd == 16'hBEEF, "SPU CAMAC read, short cycle");
    cpu_wr(CP_STAT, 16'o000);
    $display("SPU cycles of a one-word read routine: 50-ns RAM %0d, 200-ns RAM %0d, CAMAC normal %0d, CAMAC short %0d",
             c_fast, c_sram, c_cam_n, c_cam_s);
    $display("  difference to 50-ns RAM: 200-ns %0d (document 3), CAMAC normal %0d (document 5), CAMAC short %0d (document 3)",
             c_sram - c_fast, c_cam_n - c_fast, c_cam_s - c_fast);
    check(c_fast < c_sram && c_sram <= c_cam_s && c_cam_s < c_cam_n, "access costs in the document's order");

    // ---- SPU waits on special LAM 1 (station 1) ----
    cpu_wr(CP_STAT, 16'o400);                         // EI2
    cpu_wr(16'o140400 + 16'(2 * 1), 16'o002);         // enable pattern 000001
    cpu_wr(SPU_CSR, 16'h8000 | 16'd40);
    repeat (200) @(posedge clk);
    cpu_rd(SPU_CSR, rd); check(rd[0], "SPU waiting for special LAM 1");
    ext_lam[0] = 1;
    repeat (200) @(posedge clk);
    cpu_rd(SPU_CSR, rd); check(!rd[0] && spu_lam[0], "special LAM 1 released the SPU");
    if (!rd[0]) mech[M_SPU_LAM]++;
    ext_lam[0] = 0;

    // ---- terminal loop-back at 9600 baud ----
    cpu_wr(16'o177560, 16'o100);
    cpu_wr(16'o177566, 16'o123);
    rd = 0;
    for (int k = 0; k < 200 && !rd[7]; k++) begin repeat (200) @(posedge clk); cpu_rd(16'o177560, rd); end
    check(rd[7] && irq_rx, "character received, interrupt raised");
    cpu_rd(16'o177562, rd); check(rd[7:0] == 8'o123, "character looped back");
    if (rd[7:0] == 8'o123) mech[M_TERM]++;

    // ---- clock: CIE in the page register, 1000 Hz ----
    cpu_wr(16'o177570, 16'o100);
    cpu_rd(16'o177570, rd); check(rd == 16'o100, "page register reads back");
    if (rd == 16'o100) mech[M_PAGE]++;
    f0 = n_evnt;
    repeat (45000) @(posedge clk);
    check(n_evnt - f0 >= 2 && ev_gap == 20000, $sformatf("clock events %0d, %0d clocks apart (1 ms)", n_evnt - f0, ev_gap));
    if (n_evnt - f0 >= 2) mech[M_CLOCK]++;
    cpu_wr(16'o177570, 16'o000);

    // ---- INIT from the Access Port with the processor running ----
    seen = 0;
    fork
      camac(8, 0, 25);
      repeat (40) begin @(posedge clk); #1; if (binit) seen = 1; end
    join
    cpu_rd(CP_STAT, rd);
    check(seen && rd[8:7] == 2'b00, "INIT resets the bus devices");
    if (seen) mech[M_INIT]++;

    foreach (mech[k]) begin
      $display("mechanism %-12s %0d", mech_e'(k), mech[k]);
      check(mech[k] > 0, $sformatf("mechanism %s happened", mech_e'(k)));
    end
    finish_tb();
  end
endmodule
