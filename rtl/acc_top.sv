// acc_top: the LAMPF-style CAMAC auxiliary crate controller (ACC), one
// crate's worth of it, with the LSI-11/2 processor left outside.
//
// The ACC is a small computer that lives in a CAMAC crate beside the normal
// crate controller (CC).  Its processor bus (a model of the Q-bus) joins:
//   - the processor (outside; its bus cycles enter on `cpu_mreq`),
//   - the processor-board logic: page control register, multifrequency
//     clock, terminal port, 1K RAM at 0 and 1K boot PROM at 170000,
//   - memory boards: 200-ns static RAM, 50-ns fast RAM, 450-ns PROM,
//   - the Control Port (CP), through which the ACC drives the Dataway,
//   - the Special Processor Unit (SPU), a bit-slice microprogrammed engine,
//   - the Access Port (AP), through which the system controller on the
//     CAMAC highway reads and writes ACC memory by DMA.
// The AP and SPU are DMA masters, arbitrated by qbus_arbiter (AP first).
// Every master issues 16-bit addresses; the page register adds bits 17:16.
//
// The crate's Dataway is formed here: while the CP holds Busy its command,
// with the station number decoded by min_controller, drives the Dataway;
// otherwise the CC's command (`cc_cmd`) does.  The AP, the CP's own LAM
// source and the PROM simulator are CAMAC modules in stations AP_STATION,
// CP_STATION and SIM_STATION; their responses are OR-ed with those of the
// other modules of the crate (`ext_rsp`) and go both to the CP and back to
// the CC (`cc_rsp`).  The SPU takes its microcode from the PROM simulator,
// so the system controller can load it over the Dataway.
//
// Power-up/RESET (`rst`) and the bus INIT issued by the AP clear the
// processor-board registers and the bus devices.
//
// The SPU does not look at whether another master wants the bus (it holds
// the bus for a whole routine and gives it back when done), so the
// arbiter's other_req[1] and other_master[1] are left unused.
module acc_top
  import acc_pkg::*;
#(
  parameter int          AP_STATION  = 8,
  parameter int          SIM_STATION = 10,
  parameter int          CP_STATION  = 22,
  parameter int unsigned CLK_HZ      = 20_000_000,
  parameter int unsigned DIV_100HZ   = 200_000,
  parameter int unsigned DIV_1KHZ    = 20_000
) (
  input  logic        clk,
  input  logic        rst,
  // processor (LSI-11/2) bus port
  input  qbus_mreq_t  cpu_mreq,
  output qbus_rsp_t   cpu_rsp,
  output logic        dma_active,
  input  logic        cpu_run,
  input  logic        halt_sw,
  output logic        halt,
  output logic        cpu_reset,
  output logic        binit,
  // processor interrupt lines and vectors
  output logic        irq_lam,
  output logic [8:0]  vec_lam,
  output logic        irq_rx,
  output logic        evnt,
  // terminal
  input  logic [3:0]  baud_sw,
  input  logic        rxd,
  output logic        txd,
  input  logic        clk_sel_1khz,
  // crate controller side of the Dataway
  input  dw_cmd_t     cc_cmd,
  output dw_rsp_t     cc_rsp,
  output dw_cmd_t     dw,
  input  dw_rsp_t     ext_rsp,
  input  logic [23:0] ext_lam,
  output logic [23:0] lam,
  // Auxiliary Controller Bus arbitration
  output logic        acb_req,
  input  logic        acb_grant,
  input  logic        acb_acl,
  // board switches and observation
  input  logic        cp_sw4_open,
  output logic [5:0]  spu_lam,
  output logic        spu_ef,
  output logic        spu_ce,
  output logic        spu_stack_full,
  output logic        sim_access_mode,
  output qbus_req_t   bus_req,
  output qbus_rsp_t   bus_rsp
);
  logic dev_rst;
  assign dev_rst = rst || binit;

  // ---------------- bus masters ----------------
  logic [1:0]  dmr, dmg, other_req, other_master;
  qbus_mreq_t  ap_mreq, spu_mreq, m;
  logic [1:0]  page;

  qbus_arbiter #(.NM(2)) u_arb (
    .clk, .rst(dev_rst), .cpu_sync(cpu_mreq.sync), .dmr, .dmg, .dma_active,
    .other_req, .other_master
  );

  always_comb begin
    if (dmg[0])      m = ap_mreq;
    else if (dmg[1]) m = spu_mreq;
    else             m = cpu_mreq;
    bus_req.sync  = m.sync;
    bus_req.din   = m.din;
    bus_req.dout  = m.dout;
    bus_req.addr  = {page, m.addr};
    bus_req.wdata = m.wdata;
  end

  // ---------------- bus slaves ----------------
  qbus_rsp_t r_ram, r_prom, r_sram, r_fast, r_pbrd, r_page, r_clk, r_term, r_cp, r_spu;
  logic cie;

  lsi_ram    u_lsi_ram  (.clk, .rst(dev_rst), .req(bus_req), .rsp(r_ram));
  lsi_prom   u_lsi_prom (.clk, .rst(dev_rst), .req(bus_req), .rsp(r_prom));
  sram_board u_sram     (.clk, .rst(dev_rst), .req(bus_req), .rsp(r_sram));
  fast_ram   u_fast     (.clk, .rst(dev_rst), .req(bus_req), .rsp(r_fast));
  prom_board u_prom_brd (.clk, .rst(dev_rst), .req(bus_req), .rsp(r_pbrd));
  page_ctl   u_page     (.clk, .rst, .req(bus_req), .rsp(r_page), .page, .cie);
  mf_clock #(.DIV_100HZ(DIV_100HZ), .DIV_1KHZ(DIV_1KHZ)) u_clock (
    .clk, .rst, .req(bus_req), .rsp(r_clk), .sel_1khz(clk_sel_1khz), .cie, .evnt
  );
  logic term_halt;
  term_port #(.CLK_HZ(CLK_HZ)) u_term (
    .clk, .rst, .req(bus_req), .rsp(r_term), .baud_sw, .rxd, .txd,
    .rx_irq(irq_rx), .halt(term_halt)
  );

  // ---------------- Dataway ----------------
  acb_cmd_t cp_acb;
  dw_cmd_t  cp_dw;
  dw_rsp_t  ap_rsp, cp_rsp, sim_rsp, all_rsp;
  logic     cp_l;

  logic [23:0] acb_lam;
  min_controller u_minc (.acb(cp_acb), .dw(cp_dw), .dw_lam(lam), .acb_lam);

  always_comb begin
    dw   = cp_acb.b ? cp_dw : cc_cmd;
    dw.i = cp_dw.i || cc_cmd.i;
  end

  assign all_rsp = ap_rsp | cp_rsp | sim_rsp | ext_rsp;
  assign cc_rsp  = all_rsp;

  always_comb begin
    lam = ext_lam;
    lam[CP_STATION-1] = ext_lam[CP_STATION-1] || cp_l;
  end

  control_port #(.PAGE(2'b00), .CP_STATION(CP_STATION)) u_cp (
    .clk, .rst(dev_rst), .req(bus_req), .rsp(r_cp),
    .dw_out(cp_acb), .dw_rin(all_rsp), .acb_req, .acb_grant, .acb_acl,
    .lam(acb_lam), .dw_i_line(dw.i), .dw, .dw_rsp(cp_rsp), .l_out(cp_l),
    .sw4_open(cp_sw4_open), .irq(irq_lam), .vector(vec_lam), .sl(spu_lam)
  );

  logic        ap_halt;
  access_port #(.AP_STATION(AP_STATION)) u_ap (
    .clk, .rst, .dw, .dw_rsp(ap_rsp),
    .dmr(dmr[0]), .dmg(dmg[0]), .mreq(ap_mreq), .rsp(bus_rsp),
    .other_req(other_req[0]), .other_master(other_master[0]),
    .cpu_run, .halt_sw, .halt(ap_halt), .binit, .cpu_reset
  );
  assign halt = ap_halt || term_halt;

  // ---------------- SPU and its PROM simulator ----------------
  logic [10:0] cm_addr;
  logic [39:0] cm_data;
  logic        test_inh;

  prom_sim #(.SIM_STATION(SIM_STATION)) u_sim (
    .clk, .rst, .dw, .dw_rsp(sim_rsp), .cm_addr, .cm_data,
    .test_inhibit(test_inh), .access_mode(sim_access_mode)
  );

  spu u_spu (
    .clk, .rst(dev_rst), .req(bus_req), .rsp(r_spu),
    .dmr(dmr[1]), .dmg(dmg[1]), .mreq(spu_mreq), .mrsp(bus_rsp),
    .sl(spu_lam), .cm_addr, .cm_ext_en(1'b1), .cm_ext_data(cm_data),
    .test_inhibit(test_inh), .spu_ce, .ef_out(spu_ef), .stack_full(spu_stack_full)
  );

  assign bus_rsp = r_ram | r_prom | r_sram | r_fast | r_pbrd | r_page | r_clk |
                   r_term | r_cp | r_spu;
  assign cpu_rsp = (dmg == '0) ? bus_rsp : QBUS_RSP_IDLE;
endmodule
