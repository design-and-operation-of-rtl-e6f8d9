// min_controller: the "minimum" controller that sits in the control station
// of a crate driven by a Control Port instead of a full crate controller.
//
// Its logic is the station-number decoder: the Control Port sends the
// station number over the Auxiliary Controller Bus as a 5-bit code, and the
// decoder drives the one station line N1-N24 that the code names (codes 0
// and 25-31 select no station).  All other command lines pass to the
// Dataway, and the crate's LAM lines are routed back to the Auxiliary
// Controller Bus for the Control Port.  The pull-up resistors of the real
// module are not logic and are left out.
//
// Purely combinational.
module min_controller
  import acc_pkg::*;
(
  input  acb_cmd_t    acb,
  output dw_cmd_t     dw,
  input  logic [23:0] dw_lam,
  output logic [23:0] acb_lam
);
  always_comb begin
    dw.n  = '0;
    if (acb.n >= 5'd1 && acb.n <= 5'd24) dw.n[acb.n - 5'd1] = 1'b1;
    dw.a  = acb.a;
    dw.f  = acb.f;
    dw.w  = acb.w;
    dw.s1 = acb.s1;
    dw.s2 = acb.s2;
    dw.b  = acb.b;
    dw.i  = acb.i;
    dw.z  = acb.z;
    dw.c  = acb.c;
  end
  assign acb_lam = dw_lam;
endmodule
