// Testbench for prom_sim in station 10: loads random 40-bit words into
// random locations one byte (bank) at a time over the Dataway, with MAR
// stepping by one after each A1 command, and checks the whole words on the
// SPU side, the byte read-back, MAR read-back and access mode, Test Inhibit
// during A1 cycles, that Z clears MAR, and that the SPU sees a zero word
// while the module is in access mode (entered at power-up and by A0 F16).
module tb_prom_sim;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  dw_cmd_t dw = DW_CMD_IDLE;
  dw_rsp_t dw_rsp;
  logic [10:0] cm_addr = 0;
  logic [39:0] cm_data;
  logic test_inhibit, access_mode;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  prom_sim #(.SIM_STATION(10)) dut (.clk, .rst, .dw, .dw_rsp, .cm_addr, .cm_data, .test_inhibit, .access_mode);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [23:0] cr;
  bit cx, ti_seen;
  task automatic camac(input int aa, input int ff, input logic [23:0] w = 0, input bit z = 0);
    @(negedge clk);
    dw = DW_CMD_IDLE; dw.n = z ? 24'd0 : 24'd1 << 9; dw.a = 4'(aa); dw.f = 5'(ff); dw.w = w; dw.b = 1;
    dw.z = z; dw.i = z;
    ti_seen = 0;
    repeat (4) @(negedge clk);
    dw.s1 = 1; #1; cr = dw_rsp.r; cx = dw_rsp.x; ti_seen = test_inhibit;
    repeat (4) @(negedge clk); dw.s1 = 0;
    repeat (4) @(negedge clk); dw.s2 = 1;
    repeat (4) @(negedge clk); dw.s2 = 0;
    repeat (4) @(negedge clk); dw = DW_CMD_IDLE;
  endtask

  logic [39:0] words [16];
  int locs [16];
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    check(access_mode, "power-up enters access mode");
    cm_addr = 11'd0; #1; check(cm_data == 40'h0, "SPU sees a zero word in access mode");
    for (int j = 0; j < 16; j++) begin
      words[j] = {8'($urandom), 32'($urandom)};
      locs[j] = j * 31 + 7;
    end
    // bank-major loading: MAR = bank, word; consecutive words need only one MAR load
    for (int b = 0; b < 5; b++)
      for (int j = 0; j < 16; j++) begin
        camac(0, 16, 24'((b << 9) | locs[j]));
        check(cx && access_mode, "MAR loaded, access mode");
        camac(1, 16, {16'h0, words[j][8*b +: 8]});
        check(ti_seen, "Test Inhibit during A1");
      end
    cm_addr = 11'(locs[0]); #1; check(cm_data == 40'h0, "loaded word hidden from the SPU in access mode");
    camac(0, 0); check(!access_mode, "MAR read returns the RAM to the SPU");
    for (int j = 0; j < 16; j++) begin
      cm_addr = 11'(locs[j]); #1;
      check(cm_data == words[j], $sformatf("SPU word %0d = %h expected %h", locs[j], cm_data, words[j]));
    end
    // auto increment: write bytes 3 and 4 of two consecutive words
    camac(0, 16, 24'((3 << 9) | 100));
    camac(1, 16, 24'h11);
    camac(1, 16, 24'h22);
    camac(0, 0); check(cr[11:0] == 12'((3 << 9) | 102), "MAR stepped by one per A1");
    check(!access_mode, "reading MAR leaves access mode");
    cm_addr = 100; #1; check(cm_data[31:24] == 8'h11, "byte in bank 3");
    cm_addr = 101; #1; check(cm_data[31:24] == 8'h22, "next word");
    // byte read back
    camac(0, 16, 24'((1 << 9) | locs[5]));
    camac(1, 0); check(cr[7:0] == words[5][15:8], "A1 F0 reads bank 1");
    camac(1, 0); check(cr[7:0] == words[6][15:8] || locs[6] != locs[5] + 1, "read steps MAR");
    camac(0, 0); check(cr[11:0] == 12'((1 << 9) | (locs[5] + 2)), "MAR after two reads");
    // no Test Inhibit outside A1
    camac(0, 0); check(!ti_seen, "no Test Inhibit at A0");
    // Z clears MAR
    camac(0, 16, 24'o7777);
    camac(0, 0, 0, 1'b1);
    camac(0, 0); check(cr[11:0] == 12'd0, "Z clears MAR");
    finish_tb();
  end
endmodule
