// Testbench for qbus_mem, the memory core of the memory boards.
//
// Three instances are checked side by side on separate buses: a 64-word
// read/write memory replying after 3 clocks, a 16-word read-only memory
// replying after 1 clock, and a 64-word memory with a 7-clock reply.  A
// reference array in the testbench follows every write; reads are compared
// against it, the reply latency against the LATENCY parameter, and the
// select input and read-only behaviour are checked.  Addresses above the
// memory size wrap modulo WORDS.
module tb_qbus_mem;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  qbus_req_t req = '0;
  qbus_rsp_t rsp, rsp_a, rsp_b, rsp_c;
  logic [2:0] sel = 3'b000;
  always #25 clk = ~clk;
  `include "tb_util.svh"
  `include "tb_qbus.svh"

  qbus_mem #(.WORDS(64), .LATENCY(3))                   dut_a (.clk, .rst, .req, .sel(sel[0]), .rsp(rsp_a));
  qbus_mem #(.WORDS(16), .LATENCY(1), .READ_ONLY(1'b1)) dut_b (.clk, .rst, .req, .sel(sel[1]), .rsp(rsp_b));
  qbus_mem #(.WORDS(64), .LATENCY(7))                   dut_c (.clk, .rst, .req, .sel(sel[2]), .rsp(rsp_c));
  assign rsp = sel[0] ? rsp_a : sel[1] ? rsp_b : sel[2] ? rsp_c : (rsp_a | rsp_b | rsp_c);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; finish_tb();
  end

  logic [15:0] ref_a [64];
  logic [15:0] rd, wd;
  bit ok; int lat, w;
  initial begin
    for (int k = 0; k < 64; k++) ref_a[k] = 16'h0;
    repeat (3) @(posedge clk); rst = 0;

    // memory A: random writes and reads against the reference array
    sel = 3'b001;
    for (int k = 0; k < 200; k++) begin
      w  = int'($urandom_range(0, 63));
      wd = 16'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        qb_cycle(1'b1, 18'(2 * w + 128 * $urandom_range(0, 3)), wd, rd, ok, lat);
        check(ok && lat == 3, $sformatf("A write %0d lat %0d", w, lat));
        ref_a[w] = wd;
      end else begin
        qb_cycle(1'b0, 18'(2 * w), 16'h0, rd, ok, lat);
        check(ok && lat == 3 && rd == ref_a[w], $sformatf("A read %0d got %h exp %h", w, rd, ref_a[w]));
      end
    end

    // memory B: read-only, contents stay zero, reply after one clock
    sel = 3'b010;
    qb_cycle(1'b1, 18'o6, 16'hffff, rd, ok, lat);
    check(ok && lat == 1, "B write answered in 1 clock");
    qb_cycle(1'b0, 18'o6, 16'h0, rd, ok, lat);
    check(ok && rd == 16'h0, "B write ignored");

    // memory C: 7-clock reply
    sel = 3'b100;
    qb_cycle(1'b1, 18'o10, 16'h5a5a, rd, ok, lat);
    check(ok && lat == 7, $sformatf("C write lat %0d", lat));
    qb_cycle(1'b0, 18'o10, 16'h0, rd, ok, lat);
    check(ok && lat == 7 && rd == 16'h5a5a, "C read back");

    // no select: no reply from anyone
    sel = 3'b000;
    qb_cycle(1'b0, 18'o10, 16'h0, rd, ok, lat, 20);
    check(!ok, "unselected memories stay silent");
    finish_tb();
  end
endmodule
