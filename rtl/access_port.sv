// access_port: the Dataway Access Port, through which the system controller
// (via the crate controller and the CAMAC highway) loads, reads and controls
// the auxiliary controller.
//
// The port is a CAMAC module in station AP_STATION holding a Memory Address
// Register (MAR) and a Memory Data Register (MDR).  A read or write of ACC
// memory is made by taking the processor bus by DMA (request `dmr`, grant
// `dmg`) and running one bus cycle at MAR; the cycle starts only after the
// Dataway cycle that asked for it is over, so read data is fetched with a
// later CAMAC command.  Commands (X = 1 for each):
//   A0  F24  halt the processor (it enters its console ODT)
//   A0  F25  processor running: pulse bus INIT; halted: release HALT only
//   A1  F25  release HALT and pulse the processor RESET (boot at 173000)
//   A2  F1   read MAR            F17  write MAR, start a DMA read at MAR
//   A3  F0   read MDR            F16  write MDR, start a DMA write at MAR,
//                                     MAR += 2 after it
//                                F25  MAR += 2, then start a DMA read
//   A4  F27  Q = 1 if the requested cycle took place and no other device
//            has a bus request pending
//   A12 F1   status: R1 DMA cycle in progress, R2 another device is bus
//            master, R3 HALT asserted (by the port or the board switch)
// For F17, F16 and A3 F25, Q = 1 says the cycle can proceed; Q = 0 says a
// DMA cycle of the port was still under way and the command must be
// repeated.  Dataway C (with S2) resets the port; Z is ignored.  W data
// is steady from S1 to S2 and is taken, like every action, at S2.  All this
// follows the document; the DMA handshake is the bus model's (see acc_pkg).
// The port has no use for the Dataway's S1, I and Z lines, so those bits of
// `dw` are left unread.
module access_port
  import acc_pkg::*;
#(
  parameter int AP_STATION = 8
) (
  input  logic       clk,
  input  logic       rst,
  // Dataway
  input  dw_cmd_t    dw,
  output dw_rsp_t    dw_rsp,
  // processor bus, as DMA master
  output logic       dmr,
  input  logic       dmg,
  output qbus_mreq_t mreq,
  input  qbus_rsp_t  rsp,
  input  logic       other_req,     // another device requests the bus
  input  logic       other_master,  // another device is bus master
  // processor control
  input  logic       cpu_run,       // processor running (not in ODT)
  input  logic       halt_sw,       // HALT/RUN switch on the processor board
  output logic       halt,
  output logic       binit,
  output logic       cpu_reset
);
  typedef enum logic [1:0] { D_IDLE, D_WAIT, D_REQ, D_CYC } dstate_e;
  dstate_e     ds;
  logic [15:0] mar, mdr;
  logic        dma_wr, cyc_done;

  wire sel = dw.n[AP_STATION-1];
  wire busy = (ds != D_IDLE);

  wire c_dis   = sel && dw.a == 4'd0  && dw.f == 5'd24;
  wire c_xeq0  = sel && dw.a == 4'd0  && dw.f == 5'd25;
  wire c_xeq1  = sel && dw.a == 4'd1  && dw.f == 5'd25;
  wire c_rmar  = sel && dw.a == 4'd2  && dw.f == 5'd1;
  wire c_wmar  = sel && dw.a == 4'd2  && dw.f == 5'd17;
  wire c_rmdr  = sel && dw.a == 4'd3  && dw.f == 5'd0;
  wire c_wmdr  = sel && dw.a == 4'd3  && dw.f == 5'd16;
  wire c_xeq3  = sel && dw.a == 4'd3  && dw.f == 5'd25;
  wire c_tst   = sel && dw.a == 4'd4  && dw.f == 5'd27;
  wire c_stat  = sel && dw.a == 4'd12 && dw.f == 5'd1;
  wire c_start = c_wmar || c_wmdr || c_xeq3;

  always_comb begin
    dw_rsp   = DW_RSP_IDLE;
    dw_rsp.x = c_dis || c_xeq0 || c_xeq1 || c_rmar || c_wmar || c_rmdr ||
               c_wmdr || c_xeq3 || c_tst || c_stat;
    if (c_rmar) dw_rsp.r[15:0] = mar;
    if (c_rmdr) dw_rsp.r[15:0] = mdr;
    if (c_stat) dw_rsp.r[2:0]  = {halt || halt_sw, other_master, busy};
    if (c_start) dw_rsp.q = !busy;
    if (c_tst)   dw_rsp.q = cyc_done && !other_req;
  end

  always_ff @(posedge clk) begin
    if (rst || (dw.c && dw.s2)) begin
      ds <= D_IDLE; mar <= '0; mdr <= '0; dma_wr <= 1'b0; cyc_done <= 1'b0;
      binit <= 1'b0; cpu_reset <= 1'b0;
      if (rst) halt <= 1'b0;
    end else begin
      binit     <= 1'b0;
      cpu_reset <= 1'b0;
      if (dw.s2) begin
        if (c_dis) halt <= 1'b1;
        if (c_xeq0) begin
          if (cpu_run) binit <= 1'b1;
          else         halt  <= 1'b0;
        end
        if (c_xeq1) begin halt <= 1'b0; cpu_reset <= 1'b1; end
        if (c_start && !busy) begin
          if (c_wmar) mar <= dw.w[15:0];
          if (c_wmdr) mdr <= dw.w[15:0];
          if (c_xeq3) mar <= mar + 16'd2;
          dma_wr   <= c_wmdr;
          cyc_done <= 1'b0;
          ds       <= D_WAIT;
        end
      end
      unique case (ds)
        D_IDLE: ;
        D_WAIT: if (!dw.b) ds <= D_REQ;          // Dataway cycle over
        D_REQ:  if (dmg) ds <= D_CYC;
        D_CYC:  if (rsp.rply) begin
          if (!dma_wr) mdr <= rsp.rdata;
          else         mar <= mar + 16'd2;
          cyc_done <= 1'b1;
          ds       <= D_IDLE;
        end
      endcase
    end
  end

  assign dmr = (ds == D_REQ) || (ds == D_CYC);
  always_comb begin
    mreq = QBUS_MREQ_IDLE;
    if (ds == D_CYC) begin
      mreq.sync  = 1'b1;
      mreq.din   = !dma_wr;
      mreq.dout  = dma_wr;
      mreq.addr  = mar;
      mreq.wdata = mdr;
    end
  end
endmodule
