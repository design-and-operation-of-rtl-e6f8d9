// control_port: the ACC Control Port, which turns processor bus cycles into
// CAMAC Dataway cycles.
//
// Address map inside the port's page (bits 17:16 = switches 1 and 2, bits
// 15:14 = 11, so 140000-167776 octal on the chosen page):
//   140000          status register
//   140002          R24-R17 holding register (read) / W24-W17 latch (write)
//   140200-140376   64 x 1 interrupt LAM mask, bit 1 of the data word
//   140400-140576   64 x 1 SPU-LAM pattern mask, bit 1 of the data word
//   141000-167776   mapped NAF: address = 1 1 N(5) A(4) F(4) 0, N 1-23
// A mapped cycle's function is F = 16*DOUT + the four address F bits:
//   DATI, F0-F7    Dataway read; R16-R1 returned, R24-R17 held
//   DATI, F8-F15   Dataway control; Q in bit 0, X in bit 1
//   DATO, F16-F23  Dataway write of W16-W1 from the data, W24-W17 from latch
//   DATO, F24-F31  Dataway control; Q and X go to the status register
// The processor's bus cycle is answered only when the Dataway cycle is over.
//
// Status register, read: 0 Q, 1 X, 2 L (L-source), 3 LE (LAM mask),
// 4 I* (Inhibit line), 5 MC, 6 SC, 7 EI1, 8 EI2, 9-15 read as 1.
// Written: 0 L (1 sets the L-source), 2 Z, 3 C (run a Z or C cycle),
// 4 I (hold Inhibit), 5 MC, 6 SC, 7 EI1, 8 EI2.  Bit positions are those of
// the document's register diagrams.
//
// The port is also a CAMAC module in its own station (CP_STATION) with a
// LAM source: at A0 the crate controller can enable (F26) or disable (F24)
// the LAM mask, clear the source (F10) or test the source (F8, Q = source,
// whatever the mask); X = 1 for these four.  Its L line is source AND mask.
// A Dataway Z clears source and mask (this design's choice).
//
// Dataway arbitration, timing and modes are in cp_cycle_gen, the LAM paths
// in cp_lam.  The port's own LAM source needs only N, A, F, S2 and Z from
// the Dataway input `dw`; its W, S1, B, I and C bits are left unread.
// The station number leaves the port as a 5-bit code for the
// controller in the control station to decode.
module control_port
  import acc_pkg::*;
#(
  parameter logic [1:0] PAGE       = 2'b00,
  parameter int         CP_STATION = 22,
  parameter int         SL_STATION [6] = '{1, 2, 3, 4, 5, 6}
) (
  input  logic        clk,
  input  logic        rst,
  // processor bus
  input  qbus_req_t   req,
  output qbus_rsp_t   rsp,
  // Dataway master side
  output acb_cmd_t    dw_out,
  input  dw_rsp_t     dw_rin,
  output logic        acb_req,
  input  logic        acb_grant,
  input  logic        acb_acl,
  input  logic [23:0] lam,
  input  logic        dw_i_line,   // state of the Inhibit line
  // Dataway slave side (the port's own station)
  input  dw_cmd_t     dw,
  output dw_rsp_t     dw_rsp,
  output logic        l_out,
  // LAM paths
  input  logic        sw4_open,
  output logic        irq,
  output logic [8:0]  vector,
  output logic [5:0]  sl
);
  // ---------------- registers ----------------
  logic       st_q, st_x, l_src, le, i_hold, mc, sc, ei1, ei2;
  logic [7:0] hold_r, hold_w;

  // ---------------- decode ----------------
  wire        in_page = (req.addr[17:16] == PAGE) && (req.addr[15:14] == 2'b11);
  wire [4:0]  an      = cp_addr_n(req.addr[15:0]);
  wire        a_reg   = in_page && (an == 5'd0);
  wire        a_stat  = a_reg && (req.addr[8:0] == 9'o000);
  wire        a_hold  = a_reg && (req.addr[8:0] == 9'o002);
  wire        a_m1    = a_reg && (req.addr[8:7] == 2'b01);
  wire        a_m2    = a_reg && (req.addr[8:7] == 2'b10);
  wire        a_naf   = in_page && (an >= 5'd1) && (an <= 5'd23);
  wire [4:0]  naf_f   = {req.dout, cp_addr_f(req.addr[15:0])};

  typedef enum logic [1:0] { B_IDLE, B_DW, B_DONE } bstate_e;
  bstate_e bs;

  logic        g_start, g_cyc, g_done, g_q, g_x, g_z, g_c;
  logic [23:0] g_r, g_w;

  wire act = req.sync && (req.din || req.dout);

  // mask RAM port
  logic m_rbit;
  logic m_we;
  assign m_we = act && (bs == B_IDLE) && req.dout && (a_m1 || a_m2);

  logic [4:0] lam_code;
  cp_lam #(.SL_STATION(SL_STATION)) u_lam (
    .clk, .rst, .lam, .ei1, .ei2, .sw4_open,
    .m_we, .m_sel2(a_m2), .m_addr(req.addr[6:1]), .m_wbit(req.wdata[1]), .m_rbit,
    .irq, .vector, .code(lam_code), .sl
  );
  // the vector offset is the encoded LAM number times four
  a_vec_code: assert property (@(posedge clk) disable iff (rst) vector[6:2] == lam_code);

  assign g_w = {hold_w, req.wdata};

  cp_cycle_gen u_gen (
    .clk, .rst,
    .start(g_start), .n(an), .a(cp_addr_a(req.addr[15:0])), .f(naf_f), .w(g_w),
    .short_cyc(sc), .mc, .do_z(g_z), .do_c(g_c), .i_hold,
    .cyc(g_cyc), .done(g_done), .r(g_r), .q(g_q), .x(g_x),
    .acb_req, .acb_grant, .acb_acl,
    .dw(dw_out), .dw_in(dw_rin)
  );

  // start a Dataway cycle: a mapped NAF, or a status write asking for Z or C
  wire want_naf = act && a_naf;
  wire want_zc  = act && a_stat && req.dout && (req.wdata[2] || req.wdata[3]);
  assign g_start = (bs == B_IDLE) && (want_naf || want_zc);
  assign g_z     = want_zc && req.wdata[2];
  assign g_c     = want_zc && req.wdata[3];

  // ---------------- CAMAC slave: LAM source at A0 ----------------
  wire my_n = dw.n[CP_STATION-1];
  wire cmd_ok = my_n && (dw.a == 4'd0) &&
                (dw.f == 5'd8 || dw.f == 5'd10 || dw.f == 5'd24 || dw.f == 5'd26);
  always_comb begin
    dw_rsp   = DW_RSP_IDLE;
    dw_rsp.x = cmd_ok;
    dw_rsp.q = cmd_ok && (dw.f == 5'd8) && l_src;
  end
  assign l_out = l_src && le;

  // ---------------- sequential ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      bs <= B_IDLE; rsp <= QBUS_RSP_IDLE;
      st_q <= 1'b0; st_x <= 1'b0; l_src <= 1'b0; le <= 1'b0; i_hold <= 1'b0;
      mc <= 1'b0; sc <= 1'b0; ei1 <= 1'b0; ei2 <= 1'b0; hold_r <= '0; hold_w <= '0;
    end else begin
      rsp <= QBUS_RSP_IDLE;
      // slave side, actions at S2
      if (dw.s2 && cmd_ok) begin
        if (dw.f == 5'd10) l_src <= 1'b0;
        if (dw.f == 5'd24) le    <= 1'b0;
        if (dw.f == 5'd26) le    <= 1'b1;
      end
      if (dw.z && dw.s2) begin l_src <= 1'b0; le <= 1'b0; end

      unique case (bs)
        B_IDLE: if (act && in_page) begin
          if (g_start) bs <= B_DW;
          else begin
            // register cycles answer at once
            bs       <= B_DONE;
            rsp.rply <= 1'b1;
            if (req.din) begin
              if (a_stat) rsp.rdata <= {7'h7F, ei2, ei1, sc, mc, dw_i_line, le, l_src, st_x, st_q};
              else if (a_hold) rsp.rdata <= {8'h00, hold_r};
              else if (a_m1 || a_m2) rsp.rdata <= {14'b0, m_rbit, 1'b0};
              else rsp.rdata <= 16'h0;
            end else begin
              if (a_stat) begin
                if (req.wdata[0]) l_src <= 1'b1;
                i_hold <= req.wdata[4];
                mc     <= req.wdata[5];
                sc     <= req.wdata[6];
                ei1    <= req.wdata[7];
                ei2    <= req.wdata[8];
              end
              if (a_hold) hold_w <= req.wdata[7:0];
            end
          end
        end
        B_DW: if (g_done) begin
          bs       <= B_DONE;
          rsp.rply <= 1'b1;
          if (a_stat) begin
            // Z/C cycle from a status write: the other bits take effect now
            if (req.wdata[0]) l_src <= 1'b1;
            i_hold <= req.wdata[4];
            mc     <= req.wdata[5];
            sc     <= req.wdata[6];
            ei1    <= req.wdata[7];
            ei2    <= req.wdata[8];
          end else begin
            st_q <= g_q;
            st_x <= g_x;
            if (!req.dout && !naf_f[3]) begin
              rsp.rdata <= g_r[15:0];
              hold_r    <= g_r[23:16];
            end else if (!req.dout) begin
              rsp.rdata <= {14'b0, g_x, g_q};
            end
          end
        end
        B_DONE: if (!req.sync) bs <= B_IDLE;
        default: bs <= B_IDLE;
      endcase
    end
  end

  // the bus request must stay still while the port works on it
  property p_req_stable;
    @(posedge clk) disable iff (rst) (bs == B_DW) |-> req.sync;
  endproperty
  a_req_stable: assert property (p_req_stable);

  logic unused;
  assign unused = g_cyc;
endmodule
