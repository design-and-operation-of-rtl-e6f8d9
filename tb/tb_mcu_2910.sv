// Testbench for mcu_2910: a directed microprogram walk whose next-address
// values are worked out by hand from the Am2910 instruction table: reset to
// 0, CONT, JMP, CJP taken and not taken, CJS/CRTN subroutine, PUSH + RFCT
// loop running counter+1 times, LDCT + RPCT, JRP, CJV, LOOP, CJPP, TWB,
// JSRP, JZ clearing the stack, the five-word stack and FULL, and the
// carry-in low (PCIN = 1) holding the microprogram counter.  One address
// per clock when the enable is high, none when it is low.
module tb_mcu_2910;
  import acc_pkg::*;
  logic clk = 0, rst = 1, ce = 1, pass = 0, ci = 1, full;
  mcu_fn_e fn = CONT;
  logic [10:0] d = 0, y;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  mcu_2910 #(.AW(11)) dut (.clk, .rst, .ce, .fn, .pass, .ci, .d, .y, .full);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; finish_tb();
  end

  task automatic step(input mcu_fn_e f, input bit p, input int dd, input int exp_y, input bit c = 1);
    @(negedge clk);
    fn = f; pass = p; d = 11'(dd); ci = c; ce = 1;
    #1;
    check(y == 11'(exp_y), $sformatf("%s pass=%0b: Y = %0d, expected %0d", f.name(), p, y, exp_y));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    #1 check(y == 0, "reset address 0");
    rst = 0;
    step(CONT, 0, 0, 1);          // first clock after reset moved upc to 1 -> 2
    step(CONT, 0, 0, 2);          // -> 3
    step(JMP,  0, 100, 100);      // -> 101
    step(CJP,  0, 200, 101);      // not taken -> 102
    step(CJP,  1, 200, 200);      // taken -> 201
    step(CJS,  1, 300, 300);      // push 201 -> 301
    step(CONT, 0, 0, 301);        // -> 302
    step(CRTN, 1, 0, 201);        // return, pop -> 202
    step(PUSH, 1, 2, 202);        // push 202 (loop top), R = 2 -> 203
    step(CONT, 0, 0, 203);
    step(RFCT, 0, 0, 202);        // R 2 -> 1
    step(CONT, 0, 0, 203);
    step(RFCT, 0, 0, 202);        // R 1 -> 0
    step(CONT, 0, 0, 203);
    step(RFCT, 0, 0, 204);        // R = 0: fall through, pop -> 205
    step(LDCT, 0, 1, 205);        // R = 1 -> 206
    step(RPCT, 0, 50, 50);        // R 1 -> 0
    step(RPCT, 0, 50, 51);        // R = 0: continue
    step(LDCT, 0, 77, 52);        // R = 77 -> 53
    step(JRP,  0, 40, 77);        // fail: jump to R -> 78
    step(JRP,  1, 40, 40);        // pass: jump to D -> 41
    step(CJV,  1, 400, 400);      // vector -> 401
    step(CJV,  0, 500, 401);      // -> 402
    step(PUSH, 0, 0, 402);        // push 402, R unchanged -> 403
    step(CONT, 0, 0, 403);
    step(LOOP, 0, 0, 402);        // fail: back to top of stack
    step(CONT, 0, 0, 403);
    step(LOOP, 1, 0, 404);        // pass: pop, continue -> 405
    step(CJS,  1, 600, 600);      // push 405
    step(CJPP, 1, 700, 700);      // jump and pop -> 701
    step(CRTN, 0, 0, 701);        // stack empty and not taken -> 702
    step(LDCT, 0, 1, 702);        // R = 1 -> 703
    step(PUSH, 0, 0, 703);        // push 703 -> 704
    step(TWB,  0, 900, 703);      // R = 1 != 0, fail: to TOS, R -> 0
    step(TWB,  0, 900, 900);      // R = 0, fail: pop, jump to D -> 901
    step(JSRP, 0, 30, 0);         // fail: to R, which TWB counted down to 0; push 901
    step(CRTN, 1, 0, 901);        // back -> 902
    step(JZ,   0, 0, 0);          // clear stack -> 1
    // fill the stack
    for (int k = 1; k <= 5; k++) step(PUSH, 0, 0, k);
    @(posedge clk); #1 check(full, "FULL after five pushes");
    step(CRTN, 1, 0, 5);          // TOS is the last pushed
    @(posedge clk); #1 check(!full, "not full after a pop");
    step(CRTN, 1, 0, 4);
    // PCIN = 1 (carry in 0): counter holds, same address again
    step(JZ,   0, 0, 0);
    step(CONT, 0, 0, 1, 0);       // -> upc stays 1
    step(CONT, 0, 0, 1, 1);       // -> 2
    step(CONT, 0, 0, 2);
    // clock enable low: nothing moves
    @(negedge clk); ce = 0;
    repeat (3) @(posedge clk);
    step(CONT, 0, 0, 3);          // step raises the enable again
    finish_tb();
  end
endmodule
