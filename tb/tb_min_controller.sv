// Testbench for min_controller: every 5-bit station code from the
// Auxiliary Controller Bus must raise exactly the one matching N line
// (codes 1-24) or none (0, 25-31), with A, F, W and the control lines
// passed unchanged, and the LAM lines returned to the bus.
module tb_min_controller;
  import acc_pkg::*;
  acb_cmd_t acb;
  dw_cmd_t dw;
  logic [23:0] dw_lam, acb_lam;
  logic clk = 0;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  min_controller dut (.acb, .dw, .dw_lam, .acb_lam);

  initial begin
    for (int n = 0; n < 32; n++) begin
      acb = acb_cmd_t'({$urandom, $urandom});
      acb.n = 5'(n);
      dw_lam = 24'($urandom);
      #10;
      if (n >= 1 && n <= 24) check(dw.n == (24'd1 << (n - 1)), $sformatf("N%0d line", n));
      else check(dw.n == 24'd0, $sformatf("code %0d selects no station", n));
      check(dw.a == acb.a && dw.f == acb.f && dw.w == acb.w, "A F W copied");
      check({dw.s1, dw.s2, dw.b, dw.i, dw.z, dw.c} == {acb.s1, acb.s2, acb.b, acb.i, acb.z, acb.c}, "control lines copied");
      check(acb_lam == dw_lam, "LAMs returned");
    end
    finish_tb();
  end
endmodule
