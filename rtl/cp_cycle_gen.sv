// cp_cycle_gen: Dataway cycle generator of the Control Port.
//
// On `start` it wins the Dataway from the other controllers of the crate and
// then runs one Dataway cycle with the command it was given.  Arbitration
// follows the auxiliary-controller scheme: the port raises `acb_req` and
// waits until `acb_grant` is present and the lockout `acb_acl` is absent.
// The cycle then asserts Busy and the command for a fixed number of clocks
// and produces the strobes:
//   normal cycle  S1 200-400 ns, S2 600-800 ns, Busy released at 1000 ns
//   short cycle   S1 200-300 ns, no S2, Busy released at 350 ns
// The short cycle is the document's (350 ns, no S2); the normal one follows
// the usual 1-us CAMAC cycle, whose timing diagram the document only refers to.
// Z and C cycles always use normal timing, as the document requires, with
// the Z or C line (and Inhibit during Z) set for the whole cycle.  R, Q and
// X are sampled on the last clock of S1.
//
// In multi-cycle mode (`mc`) the port keeps its request and Busy after a
// cycle and starts the next one without arbitrating again, until `mc` is
// cleared; it then releases the Dataway and returns to single cycles, which
// arbitrate each time.  `i_hold` holds the Inhibit line.
//
// Interface: start/cmd in; `done` pulses for one clock at the end of the
// cycle with `r`, `q`, `x` valid; `cyc` is high from start until done.
module cp_cycle_gen
  import acc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // request
  input  logic        start,
  input  logic [4:0]  n,
  input  logic [3:0]  a,
  input  logic [4:0]  f,
  input  logic [23:0] w,
  input  logic        short_cyc,   // SC mode
  input  logic        mc,          // multi-cycle mode
  input  logic        do_z,
  input  logic        do_c,
  input  logic        i_hold,
  output logic        cyc,
  output logic        done,
  output logic [23:0] r,
  output logic        q,
  output logic        x,
  // arbitration on the Auxiliary Controller Bus
  output logic        acb_req,
  input  logic        acb_grant,
  input  logic        acb_acl,
  // Dataway
  output acb_cmd_t    dw,
  input  dw_rsp_t     dw_in
);
  localparam int N_S1_ON  = DW_N_S1_ON  / CLK_NS;
  localparam int N_S1_OFF = DW_N_S1_OFF / CLK_NS;
  localparam int N_S2_ON  = DW_N_S2_ON  / CLK_NS;
  localparam int N_S2_OFF = DW_N_S2_OFF / CLK_NS;
  localparam int N_END    = DW_N_END    / CLK_NS;
  localparam int S_S1_ON  = DW_S_S1_ON  / CLK_NS;
  localparam int S_S1_OFF = DW_S_S1_OFF / CLK_NS;
  localparam int S_END    = DW_S_END    / CLK_NS;

  typedef enum logic [1:0] { IDLE, ARB, RUN, HOLD } state_e;
  state_e     st;
  logic [5:0] t;
  logic       sc_l, z_l, c_l;
  logic [4:0] n_l;
  logic [3:0] a_l;
  logic [4:0] f_l;
  logic [23:0] w_l;

  wire short_now = sc_l && !z_l && !c_l;
  wire [5:0] s1_on  = 6'(short_now ? S_S1_ON  : N_S1_ON);
  wire [5:0] s1_off = 6'(short_now ? S_S1_OFF : N_S1_OFF);
  wire [5:0] t_end  = 6'(short_now ? S_END    : N_END);
  wire       s1_now = (st == RUN) && (t >= s1_on) && (t < s1_off);
  wire       s2_now = (st == RUN) && !short_now && (t >= 6'(N_S2_ON)) && (t < 6'(N_S2_OFF));

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; t <= '0; done <= 1'b0; r <= '0; q <= 1'b0; x <= 1'b0;
      sc_l <= 1'b0; z_l <= 1'b0; c_l <= 1'b0; n_l <= '0; a_l <= '0; f_l <= '0; w_l <= '0;
    end else begin
      done <= 1'b0;
      if (start && (st == IDLE || st == HOLD)) begin
        sc_l <= short_cyc; z_l <= do_z; c_l <= do_c;
        n_l <= n; a_l <= a; f_l <= f; w_l <= w;
        t   <= '0;
        st  <= (st == HOLD) ? RUN : ARB;
      end else begin
        unique case (st)
          IDLE: ;
          ARB:  if (acb_grant && !acb_acl) begin st <= RUN; t <= '0; end
          RUN: begin
            if (t == s1_off - 6'd1) begin r <= dw_in.r; q <= dw_in.q; x <= dw_in.x; end
            if (t == t_end - 6'd1) begin
              done <= 1'b1;
              st   <= mc ? HOLD : IDLE;
            end else t <= t + 6'd1;
          end
          HOLD: if (!mc) st <= IDLE;
        endcase
      end
    end
  end

  assign cyc     = (st == ARB) || (st == RUN) || start;
  assign acb_req = (st == ARB) || (st == RUN) || (st == HOLD);

  always_comb begin
    dw    = ACB_CMD_IDLE;
    dw.i  = i_hold;
    if (st == RUN) begin
      dw.b  = 1'b1;
      dw.s1 = s1_now;
      dw.s2 = s2_now;
      if (z_l || c_l) begin
        dw.z = z_l;
        dw.c = c_l;
        dw.i = i_hold || z_l;
      end else begin
        dw.n = n_l;
        dw.a = a_l;
        dw.f = f_l;
        dw.w = w_l;
      end
    end else if (st == HOLD) begin
      dw.b = 1'b1;
    end
  end
endmodule
