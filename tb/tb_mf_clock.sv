// Testbench for mf_clock with a shortened divider (100 clocks for 1000 Hz,
// 1000 for 100 Hz, the same 10:1 ratio): checks the tick period in clocks,
// the counter read at 177574 on any page, that EVENT pulses only with CIE
// set, and that the counter clears on reset.
module tb_mf_clock;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp;
  logic sel_1khz = 1'b1, cie = 1'b0, evnt;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  mf_clock #(.DIV_100HZ(1000), .DIV_1KHZ(100)) dut (.clk, .rst, .req, .rsp, .sel_1khz, .cie, .evnt);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; finish_tb();
  end

  int t_prev, t_now, nev;
  logic [15:0] c0, c1;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    // no events with CIE clear
    nev = 0;
    repeat (500) begin @(posedge clk); #1; if (evnt) nev++; end
    check(nev == 0, "no EVENT with CIE = 0");
    cie = 1'b1;
    // period at 1000 Hz
    t_now = 0; t_prev = -1;
    for (int k = 0; k < 2000 && nev < 4; k++) begin
      @(posedge clk); #1;
      if (evnt) begin
        if (t_prev >= 0) check(k - t_prev == 100, $sformatf("1 kHz period %0d", k - t_prev));
        t_prev = k; nev++;
      end
    end
    check(nev == 4, "EVENT pulses at 1 kHz");
    // period at 100 Hz
    sel_1khz = 1'b0; nev = 0; t_prev = -1;
    for (int k = 0; k < 5000 && nev < 3; k++) begin
      @(posedge clk); #1;
      if (evnt) begin
        if (t_prev >= 0) check(k - t_prev == 1000, $sformatf("100 Hz period %0d", k - t_prev));
        t_prev = k; nev++;
      end
    end
    check(nev == 3, "EVENT pulses at 100 Hz");
    // counter advances by one per tick
    qb_read(18'o177574, c0);
    repeat (2000) @(posedge clk);
    qb_read(18'o377574, c1);
    check(c1 - c0 == 2, $sformatf("count advanced %0d in two periods", c1 - c0));
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    qb_read(18'o177574, c0);
    check(c0 == 0, "reset clears the count");
    finish_tb();
  end
endmodule
