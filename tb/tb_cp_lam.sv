// Testbench for cp_lam: fills the interrupt mask with all ones and checks
// the document's vector table (L1 -> 534 ... L23 -> 404, 400 for none),
// the priority of L1 over later LAMs, masking of single codes, the EI1
// enable, and the SPU-LAM path: with the mask bit of a pattern set (or
// switch 4 closed) the six patched LAMs appear on the special lines,
// otherwise the lines stay low.
module tb_cp_lam;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  logic [23:0] lam = 0;
  logic ei1 = 0, ei2 = 0, sw4_open = 1;
  logic m_we = 0, m_sel2 = 0, m_wbit = 0, m_rbit;
  logic [5:0] m_addr = 0;
  logic irq;
  logic [8:0] vector;
  logic [4:0] code;
  logic [5:0] sl;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  // special LAMs patched to stations 3, 5, 7, 9, 11, 13
  cp_lam #(.SL_STATION('{3, 5, 7, 9, 11, 13})) dut (
    .clk, .rst, .lam, .ei1, .ei2, .sw4_open, .m_we, .m_sel2, .m_addr, .m_wbit, .m_rbit,
    .irq, .vector, .code, .sl
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++; finish_tb();
  end

  task automatic wmask(input bit sel2, input int a, input bit v);
    @(negedge clk); m_we = 1; m_sel2 = sel2; m_addr = 6'(a); m_wbit = v;
    @(negedge clk); m_we = 0;
  endtask

  logic [5:0] pat;
  int hi;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    // masks written while the enables are off are refused
    for (int a = 0; a < 64; a++) wmask(0, a, 0);
    ei1 = 1;
    for (int a = 0; a < 64; a++) wmask(0, a, 1);
    ei1 = 0;
    wmask(0, 5, 0);          // refused: EI1 off
    m_sel2 = 0; m_addr = 5; #1; check(m_rbit == 1, "mask write refused with EI1 off");
    ei1 = 1;
    // vector table
    for (int n = 1; n <= 23; n++) begin
      lam = 24'd1 << (n - 1);
      #1;
      check(vector == 9'(9'o400 + 4 * (24 - n)), $sformatf("L%0d vector %o", n, vector));
      check(irq, $sformatf("L%0d interrupt", n));
    end
    check(9'o534 == 9'(9'o400 + 4 * 23) && 9'o404 == 9'(9'o400 + 4), "table end points");
    lam = 0; #1;
    check(vector == 9'o400 && !irq, "no LAM: vector 400, no interrupt");
    // priority: random patterns, highest priority = lowest station
    repeat (200) begin
      lam = 24'($urandom) & 24'h7FFFFF;
      #1;
      hi = 0;
      for (int n = 23; n >= 1; n--) if (lam[n-1]) hi = n;
      check(code == ((hi == 0) ? 5'd0 : 5'(24 - hi)), "priority code");
    end
    // mask off L2 (code 22)
    wmask(0, 22, 0);
    lam = 24'b110; #1;
    check(!irq && code == 5'd22, "masked L2 hides L3");
    lam = 24'b100; #1;
    check(irq && vector == 9'(9'o400 + 4 * 21), "L3 alone interrupts");
    ei1 = 0; #1;
    check(!irq, "EI1 off: no interrupt");
    // SPU LAM path
    sw4_open = 1;
    ei2 = 1;
    for (int a = 0; a < 64; a++) wmask(1, a, 0);
    wmask(1, 6'b000101, 1);
    lam = 0; lam[2] = 1; lam[6] = 1;              // stations 3 and 7 -> pattern 000101
    @(negedge clk); @(negedge clk);
    check(sl == 6'b000101, "enabled pattern reaches the SPU");
    lam[4] = 1;                                    // pattern 000111 not enabled
    @(negedge clk); @(negedge clk);
    check(sl == 6'b000000, "disabled pattern blocked");
    sw4_open = 0;
    @(negedge clk); @(negedge clk);
    check(sl == 6'b000111, "switch 4 closed enables every pattern");
    ei2 = 0;
    @(negedge clk); @(negedge clk);
    check(sl == 6'b000000, "EI2 off");
    // latency: one clock
    ei2 = 1; lam = 0;
    @(negedge clk); @(negedge clk);
    lam[12] = 1;
    @(posedge clk); #1;
    check(sl == 6'b100000, "special LAM within one clock (50 ns)");
    finish_tb();
  end
endmodule
