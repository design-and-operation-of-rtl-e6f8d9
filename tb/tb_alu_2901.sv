// Testbench for alu_2901 (four 2901 slices as one 16-bit ALU): directed
// arithmetic (2 + 3, 5 - 7 with borrow, overflow of 7FFF + 1) and 3000
// random instructions checked against a reference model of the 2901
// source, function and destination tables, including the RAM/Q shifts in
// every shifter mode, the Y = A output of destination 2, and the zero,
// sign, carry, overflow and LSB flags.
module tb_alu_2901;
  import acc_pkg::*;
  logic clk = 0, ce = 1, cin = 0;
  logic [8:0] i = 0;
  logic [3:0] a_addr = 0, b_addr = 0;
  logic [15:0] d = 0, y;
  shift_mode_e shmode = SH_ZERO;
  logic f_zero, f_neg, f_cout, f_ovr, f_lsb;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  alu_2901 dut (.clk, .ce, .i, .a_addr, .b_addr, .d, .cin, .shmode, .y, .f_zero, .f_neg, .f_cout, .f_ovr, .f_lsb);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [15:0] mr [16];
  logic [15:0] mq;

  // reference model: returns F, carry, overflow
  task automatic model(output logic [15:0] f, output bit co, output bit ov);
    logic [15:0] r, s;
    int unsigned t;
    case (i[2:0])
      0: begin r = mr[a_addr]; s = mq; end
      1: begin r = mr[a_addr]; s = mr[b_addr]; end
      2: begin r = 0; s = mq; end
      3: begin r = 0; s = mr[b_addr]; end
      4: begin r = 0; s = mr[a_addr]; end
      5: begin r = d; s = mr[a_addr]; end
      6: begin r = d; s = mq; end
      default: begin r = d; s = 0; end
    endcase
    co = 0; ov = 0;
    case (i[5:3])
      0: begin t = r + s + cin; f = 16'(t); co = t[16];
               ov = (r[15] == s[15]) && (f[15] != r[15]); end
      1: begin t = s + (~r & 16'hFFFF) + cin; f = 16'(t); co = t[16];
               ov = (s[15] != r[15]) && (f[15] != s[15]); end
      2: begin t = r + (~s & 16'hFFFF) + cin; f = 16'(t); co = t[16];
               ov = (r[15] != s[15]) && (f[15] != r[15]); end
      3: f = r | s;
      4: f = r & s;
      5: f = ~r & s;
      6: f = r ^ s;
      default: f = ~(r ^ s);
    endcase
  endtask

  logic [15:0] ef, ny;
  bit eco, eov;
  logic fill_hi, fill_lo, qfill;
  initial begin
    // clear all registers and Q through the ALU: 0 OR 0 into each
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); i = {3'd3, 3'd3, 3'd7}; d = 0; b_addr = 4'(k); mr[k] = 0;
    end
    @(negedge clk); i = {3'd0, 3'd3, 3'd7}; d = 0; mq = 0;
    // directed: R1 = 2, R2 = 3, R1 + R2
    @(negedge clk); i = {3'd3, 3'd3, 3'd7}; d = 2; b_addr = 1; mr[1] = 2;
    @(negedge clk); i = {3'd3, 3'd3, 3'd7}; d = 3; b_addr = 2; mr[2] = 3;
    @(negedge clk); i = {3'd1, 3'd0, 3'd1}; a_addr = 1; b_addr = 2; cin = 0; #1;
    check(y == 5 && !f_cout && !f_zero, "2 + 3 = 5");
    // R1 - R2 = 2 - 3 = -1: SUBS S - R with A=R2, B=R1 and carry in 1
    @(negedge clk); i = {3'd1, 3'd1, 3'd1}; a_addr = 2; b_addr = 1; cin = 1; #1;
    check(y == 16'hFFFF && f_neg && !f_cout, "2 - 3 = -1 with borrow");
    @(negedge clk); i = {3'd1, 3'd0, 3'd7}; d = 16'h7FFF; cin = 1; #1;
    check(y == 16'h8000 && f_ovr && !f_cout, "7FFF + 1 overflows");
    @(negedge clk); i = {3'd1, 3'd0, 3'd7}; d = 16'hFFFF; cin = 1; #1;
    check(y == 0 && f_zero && f_cout && !f_ovr, "FFFF + 1 carries to zero");
    // random
    repeat (3000) begin
      @(negedge clk);
      i = 9'($urandom); a_addr = 4'($urandom); b_addr = 4'($urandom);
      d = 16'($urandom); cin = 1'($urandom); shmode = shift_mode_e'($urandom % 4);
      #1;
      model(ef, eco, eov);
      ny = (i[8:6] == 2) ? mr[a_addr] : ef;
      check(y == ny, $sformatf("Y i=%o: %h expected %h", i, y, ny));
      check(f_zero == (ef == 0) && f_neg == ef[15] && f_lsb == ef[0], "Z N LSB flags");
      if (i[5:3] <= 2) check(f_cout == eco && f_ovr == eov, $sformatf("carry/overflow i=%o", i));
      // expected register file after the clock
      case (shmode)
        SH_ZERO:  begin fill_hi = 0; fill_lo = 0; qfill = 0; end
        SH_ONE:   begin fill_hi = 1; fill_lo = 1; qfill = 1; end
        SH_ROT:   begin fill_hi = (i[8:6] == 4) ? mq[0] : ef[0]; fill_lo = ef[15]; qfill = ef[15]; end
        default:  begin fill_hi = ef[15]; fill_lo = 0; qfill = 0; end
      endcase
      if (i[8:6] == 6) fill_lo = mq[15];
      case (i[8:6])
        0: mq = ef;
        1: ;
        2, 3: mr[b_addr] = ef;
        4: begin mr[b_addr] = {fill_hi, ef[15:1]}; mq = {ef[0], mq[15:1]}; end
        5: mr[b_addr] = {fill_hi, ef[15:1]};
        6: begin mr[b_addr] = {ef[14:0], fill_lo}; mq = {mq[14:0], qfill}; end
        default: mr[b_addr] = {ef[14:0], fill_lo};
      endcase
    end
    @(negedge clk);
    for (int k = 0; k < 16; k++) check(dut.ram[k] == mr[k], $sformatf("register %0d", k));
    check(dut.q == mq, "Q register");
    finish_tb();
  end
endmodule
