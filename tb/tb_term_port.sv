// Testbench for term_port with CLK_HZ scaled so that 9600 baud is 100
// clocks a bit: a character written to XBUF is sent as start, 8 data bits
// LSB first, two stop bits; looped back to the receiver it sets DONE and
// reads from RBUF; the receive interrupt follows IE; the bit time follows
// the baud switches (2400 baud = 400 clocks); a framing error (a break)
// raises HALT until a good character arrives.
module tb_term_port;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp;
  logic [3:0] baud_sw = 4'b1110;
  logic rxd, txd, rx_irq, halt, loop = 1, rx_drv = 1;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  assign rxd = loop ? txd : rx_drv;
  term_port #(.CLK_HZ(960_000)) dut (.clk, .rst, .req, .rsp, .baud_sw, .rxd, .txd, .rx_irq, .halt);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; finish_tb();
  end

  // measure the width of the start bit and decode the frame from txd
  task automatic watch_frame(output int width, output logic [7:0] ch, output bit stop_ok);
    int n = 0;
    while (txd) @(posedge clk);
    while (!txd && n < 10000) begin @(posedge clk); n++; end
    width = n;
    repeat (n / 2) @(posedge clk);
    for (int b = 0; b < 8; b++) begin ch[b] = txd; repeat (n) @(posedge clk); end
    stop_ok = txd;
    repeat (n) @(posedge clk);
    stop_ok &= txd;
  endtask

  task automatic send_char(input logic [7:0] ch, input int nb, input bit bad_stop);
    logic [10:0] fr = {2'b11, ch, 1'b0};
    if (bad_stop) fr[9] = 1'b0;
    for (int b = 0; b < 11; b++) begin rx_drv = fr[b]; repeat (nb) @(posedge clk); end
    rx_drv = 1;
  endtask

  logic [15:0] rd;
  int w;
  logic [7:0] ch;
  bit sok;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    qb_read(18'o177564, rd); check(rd[7], "XCSR ready after reset");
    qb_read(18'o177560, rd); check(!rd[7], "RCSR not done after reset");
    qb_write(18'o177560, 16'o100);                 // IE
    fork
      qb_write(18'o177566, 16'h00A5);
      watch_frame(w, ch, sok);
    join
    check(w == 100, $sformatf("9600 baud bit = %0d clocks", w));
    check(ch == 8'hA5 && sok, "frame on the line");
    repeat (200) @(posedge clk);
    qb_read(18'o177560, rd); check(rd[7] && rd[6], "DONE and IE");
    check(rx_irq, "receive interrupt");
    qb_read(18'o177562, rd); check(rd[7:0] == 8'hA5, "RBUF");
    qb_read(18'o177560, rd); check(!rd[7] && !rx_irq, "reading RBUF clears DONE");
    qb_read(18'o177564, rd); check(rd[7], "transmitter ready again");
    baud_sw = 4'b1010;
    fork
      qb_write(18'o177566, 16'h003D);
      watch_frame(w, ch, sok);
    join
    check(w == 400, $sformatf("2400 baud bit = %0d clocks", w));
    check(ch == 8'h3D, "second frame");
    repeat (500) @(posedge clk);
    // framing error
    loop = 0;
    baud_sw = 4'b1110;
    send_char(8'h55, 100, 1'b1);
    repeat (300) @(posedge clk);
    check(halt, "framing error halts");
    send_char(8'h41, 100, 1'b0);
    repeat (300) @(posedge clk);
    check(!halt, "good character ends the halt");
    qb_read(18'o177562, rd); check(rd[7:0] == 8'h41, "received character");
    finish_tb();
  end
endmodule
