// Testbench for control_port, with the station decoder of the control
// station and a model CAMAC module in station 5 (a 24-bit register at A0:
// F0 read, F16 write at S1, F25 counts at S2, Z and C clear it at S2; X = 1,
// Q = 1).  The processor side checks: NAF mapping of addresses to N, A, F;
// 24-bit writes through the W24-W17 latch and reads through the R24-R17
// holding register; Q/X into the status register; cycle lengths of 1000 ns
// (normal) and 350 ns (short) as seen by the processor; Z and C cycles from
// status writes, with I during Z; multi-cycle mode holding Busy; waiting for
// the bus grant; the LAM source at the port's own station; the interrupt
// path with its mask RAM.
module tb_control_port;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp;
  acb_cmd_t cp_acb;
  dw_cmd_t cp_dw, dw, cc_cmd = DW_CMD_IDLE;
  dw_rsp_t st_rsp, cp_rsp, all_rsp;
  logic acb_req, acb_grant, acb_acl = 0, hold_grant = 0;
  logic [23:0] lam = 0;
  logic l_out, irq;
  logic [8:0] vector;
  logic [5:0] sl;
  logic [23:0] unused_lam;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  min_controller u_minc (.acb(cp_acb), .dw(cp_dw), .dw_lam(lam), .acb_lam(unused_lam));
  control_port #(.CP_STATION(22)) dut (
    .clk, .rst, .req, .rsp, .dw_out(cp_acb), .dw_rin(all_rsp), .acb_req, .acb_grant, .acb_acl,
    .lam, .dw_i_line(dw.i), .dw, .dw_rsp(cp_rsp), .l_out, .sw4_open(1'b1), .irq, .vector, .sl
  );
  always_comb begin
    dw   = cp_acb.b ? cp_dw : cc_cmd;
    dw.i = cp_dw.i || cc_cmd.i;
  end
  assign all_rsp = st_rsp | cp_rsp;
  // bus grant one clock after the request unless the test holds it off
  always_ff @(posedge clk) acb_grant <= acb_req && !hold_grant;

  // ---- model module in station 5 ----
  logic [23:0] sreg = 0;
  int n_f25 = 0, n_c = 0;
  bit s1_q, s2_q;
  always_comb begin
    st_rsp = DW_RSP_IDLE;
    if (dw.n[4]) begin
      st_rsp.x = 1'b1;
      st_rsp.q = 1'b1;
      if (dw.f == 5'd0) st_rsp.r = sreg;
      if (dw.a != 4'd0) st_rsp.q = 1'b0;
    end
  end
  always @(posedge clk) begin
    s1_q <= dw.s1;
    s2_q <= dw.s2;
    if (dw.s1 && !s1_q && dw.n[4] && dw.f == 5'd16) sreg <= dw.w;
    if (dw.s2 && !s2_q && dw.n[4] && dw.f == 5'd25) n_f25 <= n_f25 + 1;
    if (dw.s2 && !s2_q && (dw.z || dw.c)) sreg <= 24'h0;
    if (dw.s2 && !s2_q && dw.c) n_c <= n_c + 1;
  end
  // Inhibit must be up whenever Z is
  bit z_without_i = 0, saw_z = 0;
  always @(posedge clk) if (dw.z) begin saw_z <= 1; if (!dw.i) z_without_i <= 1; end
  // Busy continuity monitor
  int b_fall = 0;
  bit b_q = 0;
  always @(posedge clk) begin b_q <= dw.b; if (b_q && !dw.b) b_fall <= b_fall + 1; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; finish_tb();
  end

  function automatic logic [17:0] naf(input int nn, input int aa, input int ff);
    return {2'b00, 2'b11, 5'(nn), 4'(aa), 4'(ff & 15), 1'b0};
  endfunction

  task automatic cc_cycle(input int nn, input int aa, input int ff, output bit qq);
    @(negedge clk);
    cc_cmd = DW_CMD_IDLE; cc_cmd.n = 24'd1 << (nn - 1); cc_cmd.a = 4'(aa); cc_cmd.f = 5'(ff); cc_cmd.b = 1;
    repeat (4) @(negedge clk);
    cc_cmd.s1 = 1; #1; qq = all_rsp.q;
    repeat (4) @(negedge clk); cc_cmd.s1 = 0;
    repeat (4) @(negedge clk); cc_cmd.s2 = 1;
    repeat (4) @(negedge clk); cc_cmd.s2 = 0;
    repeat (4) @(negedge clk); cc_cmd = DW_CMD_IDLE;
  endtask

  logic [15:0] rd;
  bit ok, qq;
  int lat, lat_norm, lat_short, f0;
  logic [23:0] v;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    // 24-bit write and read, normal cycles
    for (int j = 0; j < 5; j++) begin
      v = 24'($urandom);
      qb_write(18'o140002, {8'h0, v[23:16]});
      qb_cycle(1'b1, naf(5, 0, 16), v[15:0], rd, ok, lat);
      check(ok && sreg == v, $sformatf("24-bit write %h got %h", v, sreg));
      lat_norm = lat;
      qb_cycle(1'b0, naf(5, 0, 0), 16'h0, rd, ok, lat);
      check(ok && rd == v[15:0], "read R16-R1");
      qb_read(18'o140002, rd);
      check(rd[7:0] == v[23:16], "holding register R24-R17");
    end
    // grant 1 clock, 20 clocks of Busy, reply: at least 1000 ns
    check(lat_norm >= 21 && lat_norm <= 25, $sformatf("normal cycle seen by the processor: %0d clocks", lat_norm));
    qb_read(18'o140000, rd);
    check(rd[1:0] == 2'b11 && rd[15:9] == 7'h7F, "status Q X and unused ones");
    // Q = 0 at A1: control read F8 returns Q/X
    qb_cycle(1'b0, naf(5, 1, 8), 16'h0, rd, ok, lat);
    check(ok && rd[1:0] == 2'b10, "F8 A1: Q = 0, X = 1");
    qb_cycle(1'b0, naf(9, 0, 8), 16'h0, rd, ok, lat);
    check(ok && rd[1:0] == 2'b00, "empty station: no X");
    // F25 with a DATO to F bits 9
    f0 = n_f25;
    qb_write(naf(5, 0, 25), 16'h0);
    check(n_f25 == f0 + 1, "F25 executed once");
    // short cycle mode
    qb_write(18'o140000, 16'o100);
    qb_read(18'o140000, rd); check(rd[6], "SC bit reads back");
    v = 24'($urandom);
    qb_write(18'o140002, {8'h0, v[23:16]});
    qb_cycle(1'b1, naf(5, 0, 16), v[15:0], rd, ok, lat);
    lat_short = lat;
    check(sreg == v, "short-cycle write");
    qb_cycle(1'b0, naf(5, 0, 0), 16'h0, rd, ok, lat);
    check(rd == v[15:0], "short-cycle read");
    check(lat_short == lat_norm - 13, $sformatf("short cycle %0d vs normal %0d clocks (350 vs 1000 ns)", lat_short, lat_norm));
    // Z from a status write (normal timing, I raised)
    qb_write(18'o140000, 16'o004);
    check(saw_z && !z_without_i && sreg == 0, "Z cycle with I, module cleared");
    qb_read(18'o140000, rd); check(!rd[6], "status write also cleared SC");
    // C cycle
    sreg = 24'h123456;
    qb_write(18'o140000, 16'o010);
    check(n_c == 1 && sreg == 0, "C cycle");
    // I hold
    qb_write(18'o140000, 16'o020);
    check(dw.i, "I line held by the port");
    qb_read(18'o140000, rd); check(rd[4], "I* reads the Inhibit line");
    qb_write(18'o140000, 16'o000);
    check(!dw.i, "I released");
    // multi-cycle: two cycles under one Busy
    qb_write(18'o140000, 16'o040);
    f0 = b_fall;
    qb_write(naf(5, 0, 25), 16'h0);
    qb_write(naf(5, 0, 25), 16'h0);
    check(b_fall == f0 && dw.b, "Busy held across multi-cycle");
    qb_write(18'o140000, 16'o000);
    repeat (2) @(posedge clk);
    check(!dw.b, "Busy dropped after MC clears");
    // bus grant held off: the processor waits
    hold_grant = 1;
    fork
      qb_cycle(1'b0, naf(5, 0, 0), 16'h0, rd, ok, lat, 300);
      begin
        repeat (60) @(posedge clk);
        check(!rsp.rply && !dw.b, "no Dataway cycle and no reply without the bus");
        hold_grant = 0;
      end
    join
    check(ok && lat >= 80, $sformatf("cycle after a late grant (%0d clocks)", lat));
    // the port's own LAM source at N22
    qb_write(18'o140000, 16'o001);
    cc_cycle(22, 0, 8, qq); check(qq, "F8 tests the L source");
    check(!l_out, "no L while the mask is off");
    cc_cycle(22, 0, 26, qq); check(l_out, "F26 enables the LAM");
    qb_read(18'o140000, rd); check(rd[2] && rd[3], "status L and LE");
    cc_cycle(22, 0, 10, qq); check(!l_out, "F10 clears the source");
    cc_cycle(22, 0, 8, qq); check(!qq, "F8 after clear");
    // interrupt path: EI1, mask bit for code of L5 (24 - 5 = 19)
    qb_write(18'o140000, 16'o200);
    qb_write(18'o140200 + 2 * 19, 16'o002);
    qb_read(18'o140200 + 2 * 19, rd); check(rd == 16'o002, "mask bit reads back in bit 1");
    qb_read(18'o140200 + 2 * 18, rd); check(rd == 16'o000, "other mask bit clear");
    lam[4] = 1'b1;
    @(posedge clk); #1;
    check(irq && vector == 9'o514, $sformatf("L5 interrupt vector %o", vector));
    lam[4] = 1'b0; lam[5] = 1'b1;
    @(posedge clk); #1;
    check(!irq, "L6 masked");
    finish_tb();
  end
endmodule
