// acc_pkg: types and constants shared by the auxiliary crate controller.
//
// The controller has two buses.  The internal bus is the processor's Q-bus
// (here a synchronous model of it), carrying 18-bit byte addresses: a 16-bit
// address from the bus master plus two page-extension bits supplied by the
// processor board's page control register.  The crate bus is the CAMAC
// Dataway with its N/A/F command, 24-bit R and W data, Q and X responses,
// strobes S1 and S2, Busy, Inhibit, Initialise (Z) and Clear (C).
//
// Q-bus model: a master raises `sync` together with `din` (read, DATI) or
// `dout` (write, DATO), the address and write data, and holds them until it
// sees `rply`.  The addressed slave pulses `rply` for one clock, with read
// data on `rdata`; the master then drops `sync` for at least one clock.
// Slave responses are OR-ed together, as the open-collector Q-bus lines are.
// Only word transfers are modelled.
//
// Linted on its own, the package shows its constants as unused; they are
// used by the modules that import it (CF_NOP only names code 0 for
// microprogram writers), and the cp_addr_* helpers look at only the
// address bits of their field.
//
// Time base: every block runs from one clock of period CLK_NS (50 ns).  The
// Dataway strobe times are written in nanoseconds and divided by CLK_NS.
package acc_pkg;

  // clock period of the whole model, ns
  localparam int CLK_NS = 50;

  // ---------------- Q-bus ----------------
  typedef struct packed {
    logic        sync;   // cycle in progress (BSYNC)
    logic        din;    // read (BDIN)
    logic        dout;   // write (BDOUT)
    logic [15:0] addr;   // 16-bit address from a bus master
    logic [15:0] wdata;
  } qbus_mreq_t;

  typedef struct packed {
    logic        sync;
    logic        din;
    logic        dout;
    logic [17:0] addr;   // extended address: page bits 17:16 added
    logic [15:0] wdata;
  } qbus_req_t;

  typedef struct packed {
    logic        rply;   // one-clock reply (BRPLY)
    logic [15:0] rdata;
  } qbus_rsp_t;

  localparam qbus_rsp_t QBUS_RSP_IDLE = '{rply: 1'b0, rdata: 16'h0};
  localparam qbus_mreq_t QBUS_MREQ_IDLE = '{sync: 1'b0, din: 1'b0, dout: 1'b0, addr: 16'h0, wdata: 16'h0};

  // processor-board register addresses (low 16 bits, any page)
  localparam logic [15:0] A_PAGE_CSR = 16'o177570;
  localparam logic [15:0] A_CLOCK    = 16'o177574;
  localparam logic [15:0] A_RCSR     = 16'o177560;
  localparam logic [15:0] A_RBUF     = 16'o177562;
  localparam logic [15:0] A_XCSR     = 16'o177564;
  localparam logic [15:0] A_XBUF     = 16'o177566;

  // interrupt vectors
  localparam logic [8:0] VEC_LAM_BASE = 9'o400;

  // ---------------- CAMAC Dataway ----------------
  typedef struct packed {
    logic [23:0] n;    // station lines, n[0] = N1 ... n[23] = N24
    logic [3:0]  a;    // subaddress A0..A15
    logic [4:0]  f;    // function F0..F31
    logic [23:0] w;    // write lines W24..W1
    logic        s1;
    logic        s2;
    logic        b;    // Busy
    logic        i;    // Inhibit
    logic        z;    // Initialise
    logic        c;    // Clear
  } dw_cmd_t;

  typedef struct packed {
    logic [23:0] r;    // read lines R24..R1
    logic        q;
    logic        x;
  } dw_rsp_t;

  // Dataway command as the Control Port sends it: the station number goes
  // out as a 5-bit code on the Auxiliary Controller Bus and is decoded into
  // the station lines by the controller in the control station.
  typedef struct packed {
    logic [4:0]  n;
    logic [3:0]  a;
    logic [4:0]  f;
    logic [23:0] w;
    logic        s1;
    logic        s2;
    logic        b;
    logic        i;
    logic        z;
    logic        c;
  } acb_cmd_t;

  localparam dw_cmd_t DW_CMD_IDLE = '0;
  localparam acb_cmd_t ACB_CMD_IDLE = '0;
  localparam dw_rsp_t DW_RSP_IDLE = '0;

  // Dataway strobe timing, ns from the start of the cycle (t0).
  // Normal cycle: the document refers to the CAMAC standard's timing diagram.
  localparam int DW_N_S1_ON  = 200;
  localparam int DW_N_S1_OFF = 400;
  localparam int DW_N_S2_ON  = 600;
  localparam int DW_N_S2_OFF = 800;
  localparam int DW_N_END    = 1000;
  // Short cycle (document's short-cycle sketch): S1 at 200 ns for 100 ns,
  // no S2, cycle over at 350 ns.
  localparam int DW_S_S1_ON  = 200;
  localparam int DW_S_S1_OFF = 300;
  localparam int DW_S_END    = 350;

  // ---------------- CAMAC address map of the Control Port ----------------
  // 18-bit address 1 1 N(5) A(4) F(4) 0 inside the CP page
  function automatic logic [4:0] cp_addr_n(input logic [15:0] a); return a[13:9]; endfunction
  function automatic logic [3:0] cp_addr_a(input logic [15:0] a); return a[8:5];  endfunction
  function automatic logic [3:0] cp_addr_f(input logic [15:0] a); return a[4:1];  endfunction

  // ---------------- SPU microinstruction (40 bits) ----------------
  typedef struct packed {
    logic [3:0] fn;      // 39:36 sequencer function F3-F0
    logic [4:0] tc;      // 35:31 test condition T4-T0
    logic [1:0] cc;      // 30:29 condition control
    logic [4:0] cf;      // 28:24 control field
    logic       pcin;    // 23    sequencer carry: 0 increment, 1 pass
    logic [2:0] src;     // 22:20 ALU source I2-I0
    logic [2:0] fnc;     // 19:17 ALU function I5-I3
    logic [2:0] dst;     // 16:14 ALU destination I8-I6
    logic       bc;      // 13    0: ALU D <- bus, 1: bus <- ALU Y
    logic       cin;     // 12    ALU carry in
    logic       stds;    // 11    test-condition latch disable
    logic [2:0] d;       // 10:8  sequencer direct bits D10-D8
    logic [3:0] b;       // 7:4   ALU B address / D7-D4
    logic [3:0] a;       // 3:0   ALU A address / parameter RAM / D3-D0
  } spu_uinst_t;

  // sequencer functions
  typedef enum logic [3:0] {
    JZ = 4'o0, CJS = 4'o1, JMP = 4'o2, CJP = 4'o3, PUSH = 4'o4, JSRP = 4'o5,
    CJV = 4'o6, JRP = 4'o7, RFCT = 4'd8, RPCT = 4'd9, CRTN = 4'd10, CJPP = 4'd11,
    LDCT = 4'd12, LOOP = 4'd13, CONT = 4'd14, TWB = 4'd15
  } mcu_fn_e;

  // control field codes (octal in the document)
  localparam logic [4:0] CF_NOP  = 5'o00;
  localparam logic [4:0] CF_DMA  = 5'o01;
  localparam logic [4:0] CF_CDE  = 5'o02;
  localparam logic [4:0] CF_LBA  = 5'o03;
  localparam logic [4:0] CF_LBD  = 5'o04;
  localparam logic [4:0] CF_RC   = 5'o05;
  localparam logic [4:0] CF_WC   = 5'o06;
  localparam logic [4:0] CF_RRAM = 5'o07;
  localparam logic [4:0] CF_RBD  = 5'o10;

  // shifter modes, selected by the two low control-field bits
  typedef enum logic [1:0] { SH_ZERO = 2'd0, SH_ONE = 2'd1, SH_ROT = 2'd2, SH_ARITH = 2'd3 } shift_mode_e;

endpackage
