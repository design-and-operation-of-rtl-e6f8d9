// spu: the Special Processor Unit, a microprogrammed bit-slice processor
// that runs fast "firmware subroutines" for the ACC's main processor.
//
// Structure (as in the document): a 512 x 40 control memory feeds a 40-bit
// pipeline register (PLR) on every SPU clock; all control comes from the
// PLR.  While one microinstruction executes, the sequencer (mcu_2910) is
// already choosing the next address, so memory access and execution
// overlap.  The PLR fields (acc_pkg::spu_uinst_t) are: sequencer function,
// test condition, condition control, control field, sequencer carry (PCIN),
// the ALU's nine instruction bits, BC, ALU carry-in, STDS, and the shared
// D/B/A fields, which are at once the branch address (D10-D8,B,A), the ALU
// register addresses and the parameter-RAM address.
//
// Test conditions (octal numbers as in the document): 0 zero, 1 negative,
// 2 carry, 3 overflow, 4 odd, 5 A>B (signed, after a subtraction), 6 EF,
// 7 bus ready (DMA hold granted and no bus cycle in progress), 10-17 their
// complements, 20/21 and 30/31 reserved for a channel controller (read as
// 0 and 1), 22-27 special LAMs 1-6, 32-37 their complements.  All conditions
// are staticized in a latch on each SPU clock unless the PLR's STDS bit is
// set, so an instruction tests what the previous one produced.  Condition
// control: 0 normal, 1 always true, 2 and 3 always false.
//
// Control field: 1 request DMA hold, 2 clear hold and EF, 3 load bus address
// register (BAR) from ALU Y, 4 load bus data register (BDR) from Y, 5 read
// cycle at BAR into BDR, 6 write cycle of BDR to BAR, 7 parameter RAM word
// A onto the ALU D inputs, 10 BDR onto D; codes 14-17 only select the shift.
// The two low bits of every code choose the shifter mode (zero fill, one
// fill, rotate, arithmetic).  BC = 1 puts ALU Y on the SPU bus (D is then 0).
//
// Processor-bus slave: CSR at base (bits 17:16 = PAGE, 15:10 = 111110,
// 9:6 = UNIT, bit 5 = 0) and a 16 x 16 parameter RAM at base+040..076 that
// the processor writes and only the SPU reads.  Writing the CSR loads the
// 11-bit start address (bits 10:0) and the External Function bit EF
// (bit 15); reading it returns EF in bit 0 (1 = running, 0 = done), with the
// channel bits CINT (7) and CEN (11) at 0.  The idle microprogram waits at
// address 0 on CJV EF with the address held; when EF is set it jumps to the
// start address, and it ends with JZ + clear-EF, which returns to 0.
//
// Timing: the SPU clock is the 20-MHz model clock divided by SPU_DIV (3, so
// 150 ns against the document's 142 ns).  `test_inhibit` (from the PROM
// simulator while it is being accessed) stops the SPU clock.  With
// `cm_ext_en` the microinstruction comes from `cm_ext_data` (the simulator
// connector) instead of the on-board control memory, whose contents come
// from INIT_FILE.  Bit placement of BC, carry-in and STDS inside PLR bits
// 13:11, the CSR write format and the bus-ready condition are this design's
// reading where the document is unclear.
module spu
  import acc_pkg::*;
#(
  parameter logic [1:0] PAGE      = 2'b00,
  parameter logic [3:0] UNIT      = 4'd0,
  parameter int         SPU_DIV   = 3,
  parameter string      INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        rst,
  // processor bus, slave side
  input  qbus_req_t   req,
  output qbus_rsp_t   rsp,
  // processor bus, DMA master side
  output logic        dmr,
  input  logic        dmg,
  output qbus_mreq_t  mreq,
  input  qbus_rsp_t   mrsp,
  // special LAM lines from the Control Port
  input  logic [5:0]  sl,
  // PROM simulator connector
  output logic [10:0] cm_addr,
  input  logic        cm_ext_en,
  input  logic [39:0] cm_ext_data,
  input  logic        test_inhibit,
  // observation
  output logic        spu_ce,
  output logic        ef_out,
  output logic        stack_full   // sequencer stack holds five entries
);
  // ---------------- SPU clock ----------------
  logic [3:0] div;
  always_ff @(posedge clk) begin
    if (rst) div <= '0;
    else if (!test_inhibit) div <= (div == 4'(SPU_DIV - 1)) ? '0 : div + 4'd1;
  end
  wire ce = !test_inhibit && (div == 4'(SPU_DIV - 1));
  assign spu_ce = ce;

  // ---------------- control memory and PLR ----------------
  logic [39:0] cm [512];
  initial begin
    for (int k = 0; k < 512; k++) cm[k] = 40'h0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, cm);
  end

  spu_uinst_t plr;
  logic [10:0] y;
  wire  [39:0] cm_data = cm_ext_en ? cm_ext_data : cm[y[8:0]];
  assign cm_addr = y;

  always_ff @(posedge clk) begin
    if (rst) plr <= '0;
    else if (ce) plr <= spu_uinst_t'(cm_data);
  end

  // ---------------- registers ----------------
  logic        ef, hold_req;
  logic [10:0] vec;
  logic [15:0] bar, bdr;
  logic [15:0] pram [16];

  // ---------------- ALU ----------------
  logic [15:0] alu_y, alu_d;
  logic f_zero, f_neg, f_cout, f_ovr, f_lsb;

  always_comb begin
    alu_d = 16'h0;
    if (!plr.bc) begin
      if (plr.cf == CF_RRAM) alu_d = pram[plr.a];
      else if (plr.cf == CF_RBD) alu_d = bdr;
    end
  end

  alu_2901 u_alu (
    .clk, .ce, .i({plr.dst, plr.fnc, plr.src}), .a_addr(plr.a), .b_addr(plr.b),
    .d(alu_d), .cin(plr.cin), .shmode(shift_mode_e'(plr.cf[1:0])),
    .y(alu_y), .f_zero, .f_neg, .f_cout, .f_ovr, .f_lsb
  );

  // ---------------- bus interface ----------------
  typedef enum logic [1:0] { B_IDLE, B_PEND, B_CYC } bstate_e;
  bstate_e bs;
  logic    cyc_wr;
  wire     bus_ready = dmg && hold_req && (bs == B_IDLE);

  // ---------------- test conditions ----------------
  logic [31:0] tc_now, tc_lat;
  wire gt = !f_zero && (f_neg == f_ovr);
  always_comb begin
    tc_now = '0;
    tc_now[5'o00] = f_zero;   tc_now[5'o10] = !f_zero;
    tc_now[5'o01] = f_neg;    tc_now[5'o11] = !f_neg;
    tc_now[5'o02] = f_cout;   tc_now[5'o12] = !f_cout;
    tc_now[5'o03] = f_ovr;    tc_now[5'o13] = !f_ovr;
    tc_now[5'o04] = f_lsb;    tc_now[5'o14] = !f_lsb;
    tc_now[5'o05] = gt;       tc_now[5'o15] = !gt;
    tc_now[5'o06] = ef;       tc_now[5'o16] = !ef;
    tc_now[5'o07] = bus_ready; tc_now[5'o17] = !bus_ready;
    tc_now[5'o20] = 1'b0;     tc_now[5'o30] = 1'b1;   // channel: no data
    tc_now[5'o21] = 1'b0;     tc_now[5'o31] = 1'b1;   // channel: buffer full
    for (int k = 0; k < 6; k++) begin
      tc_now[5'(18 + k)] = sl[k];
      tc_now[5'(26 + k)] = !sl[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) tc_lat <= '0;
    else if (ce && !plr.stds) tc_lat <= tc_now;
  end

  logic pass;
  always_comb begin
    unique case (plr.cc)
      2'd0:    pass = tc_lat[plr.tc];
      2'd1:    pass = 1'b1;
      default: pass = 1'b0;
    endcase
  end

  // ---------------- sequencer ----------------
  mcu_fn_e fn;
  assign fn = mcu_fn_e'(plr.fn);
  wire [10:0] seq_d = (fn == CJV) ? vec : {plr.d, plr.b, plr.a};

  mcu_2910 #(.AW(11)) u_mcu (
    .clk, .rst, .ce, .fn, .pass, .ci(!plr.pcin), .d(seq_d), .y, .full(stack_full)
  );

  // ---------------- processor-bus slave ----------------
  logic sdone;
  wire  s_sel  = (req.addr[17:16] == PAGE) && (req.addr[15:10] == 6'b111110) &&
                 (req.addr[9:6] == UNIT);
  wire  s_act  = req.sync && s_sel && (req.din || req.dout) && !sdone;
  wire  a_pram = req.addr[5];

  always_ff @(posedge clk) begin
    if (rst) begin
      ef <= 1'b0; vec <= '0; sdone <= 1'b0; rsp <= QBUS_RSP_IDLE;
      hold_req <= 1'b0; bar <= '0; bdr <= '0; bs <= B_IDLE; cyc_wr <= 1'b0;
    end else begin
      rsp <= QBUS_RSP_IDLE;
      if (!req.sync) sdone <= 1'b0;
      else if (s_act) begin
        sdone    <= 1'b1;
        rsp.rply <= 1'b1;
        if (req.din && !a_pram) rsp.rdata <= {15'b0, ef};
        if (req.dout) begin
          if (a_pram) pram[req.addr[4:1]] <= req.wdata;
          else begin
            vec <= req.wdata[10:0];
            ef  <= req.wdata[15];
          end
        end
      end

      // control field actions, one per SPU clock
      if (ce) begin
        unique case (plr.cf)
          CF_DMA: hold_req <= 1'b1;
          CF_CDE: begin hold_req <= 1'b0; ef <= 1'b0; end
          CF_LBA: bar <= alu_y;
          CF_LBD: bdr <= alu_y;
          CF_RC:  if (bus_ready) begin bs <= B_PEND; cyc_wr <= 1'b0; end
          CF_WC:  if (bus_ready) begin bs <= B_PEND; cyc_wr <= 1'b1; end
          default: ;
        endcase
      end

      unique case (bs)
        B_IDLE: ;
        B_PEND: bs <= B_CYC;
        B_CYC:  if (mrsp.rply) begin
          if (!cyc_wr) bdr <= mrsp.rdata;
          bs <= B_IDLE;
        end
        default: bs <= B_IDLE;
      endcase
    end
  end

  assign dmr    = hold_req;
  assign ef_out = ef;

  always_comb begin
    mreq = QBUS_MREQ_IDLE;
    if (bs == B_CYC) begin
      mreq.sync  = 1'b1;
      mreq.din   = !cyc_wr;
      mreq.dout  = cyc_wr;
      mreq.addr  = bar;
      mreq.wdata = bdr;
    end
  end

  // a bus cycle is only run while the DMA hold is granted
  a_cyc_granted: assert property (@(posedge clk) disable iff (rst) (bs == B_CYC) |-> dmg);
endmodule
