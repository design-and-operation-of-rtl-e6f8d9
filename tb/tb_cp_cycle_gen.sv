// Testbench for cp_cycle_gen: a model CAMAC station answers every command
// with R = a function of N, A, F and Q = X = 1.  Checks: no Dataway activity
// before the bus grant; normal cycle strobes S1 at 200-400 ns and S2 at
// 600-800 ns with Busy for 1000 ns (20 clocks); the short cycle has S1 at
// 200-300 ns, no S2 and ends at 350 ns (7 clocks); R/Q/X are taken during
// S1; Z and C cycles raise Z (with I) or C and no N; multi-cycle mode keeps
// Busy and the bus between cycles without a new arbitration.
module tb_cp_cycle_gen;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  logic start = 0, short_cyc = 0, mc = 0, do_z = 0, do_c = 0, i_hold = 0;
  logic [4:0] n = 0, f = 0;
  logic [3:0] a = 0;
  logic [23:0] w = 0, r;
  logic cyc, done, q, x, acb_req, acb_grant = 0, acb_acl = 0;
  acb_cmd_t dw;
  dw_rsp_t dw_in;
  always #25 clk = ~clk;
  `include "tb_util.svh"

  cp_cycle_gen dut (.clk, .rst, .start, .n, .a, .f, .w, .short_cyc, .mc, .do_z, .do_c, .i_hold,
                    .cyc, .done, .r, .q, .x, .acb_req, .acb_grant, .acb_acl, .dw, .dw_in);

  // independent station model: answers while addressed (N nonzero), read
  // data depends only on the command lines
  function automatic logic [23:0] resp_of(input logic [4:0] nn, input logic [3:0] aa, input logic [4:0] ff);
    return {nn, aa, ff, 10'h2A5} ^ 24'h5A5A5A;
  endfunction
  always_comb begin
    dw_in = DW_RSP_IDLE;
    if (dw.n != 0) begin
      dw_in.r = resp_of(dw.n, dw.a, dw.f);
      dw_in.q = 1'b1;
      dw_in.x = 1'b1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; finish_tb();
  end

  // record strobe timing in clocks after the first clock of Busy
  int t_b, t_s1on, t_s1off, t_s2on, t_s2off, t_end, t_done, n_s2;
  bit saw_n_in_zc, saw_i_in_z, saw_z, saw_c;
  task automatic run_cycle(input bit sc, input bit z, input bit c, input logic [4:0] nn,
                           input logic [3:0] aa, input logic [4:0] ff, input logic [23:0] ww,
                           input int grant_delay);
    int k = 0;
    bit seen_b = 0, prev_b = 0, prev_s1 = 0, prev_s2 = 0;
    t_b = -1; t_s1on = -1; t_s1off = -1; t_s2on = -1; t_s2off = -1; t_end = -1; t_done = -1; n_s2 = 0;
    saw_n_in_zc = 0; saw_i_in_z = 0; saw_z = 0; saw_c = 0;
    @(negedge clk);
    start = 1; short_cyc = sc; do_z = z; do_c = c; n = nn; a = aa; f = ff; w = ww;
    @(negedge clk); start = 0;
    fork
      begin
        repeat (grant_delay) begin
          @(posedge clk); #1;
          if (!mc || !acb_grant) check(!dw.b && !dw.s1, "no Dataway activity before grant");
        end
        @(negedge clk); acb_grant = 1;
      end
      begin
        while (k < 200 && t_done < 0) begin
          @(posedge clk); #1;
          if (dw.b && !seen_b && (dw.s1 || dw.s2 || dw.n != 0 || dw.z || dw.c || t_b < 0)) begin
            seen_b = 1; t_b = k;
          end
          if (seen_b) begin
            if (dw.s1 && !prev_s1) t_s1on = k - t_b;
            if (!dw.s1 && prev_s1) t_s1off = k - t_b;
            if (dw.s2 && !prev_s2) begin t_s2on = k - t_b; n_s2++; end
            if (!dw.s2 && prev_s2) t_s2off = k - t_b;
            if ((z || c) && dw.n != 0) saw_n_in_zc = 1;
            if (dw.z) begin saw_z = 1; if (dw.i) saw_i_in_z = 1; end
            if (dw.c) saw_c = 1;
          end
          if (done) t_done = k - t_b;   // Busy ends on the same edge
          prev_s1 = dw.s1; prev_s2 = dw.s2;
          k++;
        end
      end
    join
  endtask

  logic [23:0] ww;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    // normal cycles with random commands
    for (int j = 0; j < 10; j++) begin
      ww = 24'($urandom);
      run_cycle(0, 0, 0, 5'(1 + $urandom % 23), 4'($urandom), 5'($urandom), ww, 3 + j);
      check(t_s1on == 4 && t_s1off == 8, $sformatf("normal S1 %0d-%0d clocks", t_s1on, t_s1off));
      check(t_s2on == 12 && t_s2off == 16 && n_s2 == 1, $sformatf("normal S2 %0d-%0d", t_s2on, t_s2off));
      check(t_done == 20, $sformatf("normal cycle %0d clocks (1000 ns)", t_done));
      check(r == resp_of(n, a, f) && q && x, "R Q X captured");
      acb_grant = 0;
    end
    // short cycles
    for (int j = 0; j < 5; j++) begin
      run_cycle(1, 0, 0, 5'(1 + $urandom % 23), 4'($urandom), 5'($urandom), 24'($urandom), 2);
      check(t_s1on == 4 && t_s1off == 6, $sformatf("short S1 %0d-%0d", t_s1on, t_s1off));
      check(n_s2 == 0, "short cycle has no S2");
      check(t_done == 7, $sformatf("short cycle %0d clocks (350 ns)", t_done));
      check(r == resp_of(n, a, f) && q && x, "short cycle read");
      acb_grant = 0;
    end
    // Z and C cycles (normal timing even in short mode)
    run_cycle(1, 1, 0, 5'd3, 4'd1, 5'd0, 24'h0, 2);
    check(saw_z && saw_i_in_z && !saw_n_in_zc, "Z with I, no station");
    check(t_s2on == 12 && t_done == 20, "Z cycle has normal timing and S2");
    acb_grant = 0;
    run_cycle(0, 0, 1, 5'd3, 4'd1, 5'd0, 24'h0, 2);
    check(saw_c && !saw_z && !saw_n_in_zc, "C, no station");
    acb_grant = 0;
    // inhibit hold follows the I bit
    i_hold = 1; #1; check(dw.i, "I line held"); i_hold = 0; #1; check(!dw.i, "I line released");
    // multi-cycle mode: Busy stays up, second cycle starts without arbitration
    mc = 1;
    run_cycle(0, 0, 0, 5'd5, 4'd0, 5'd0, 24'h0, 2);
    check(t_done == 20, "first multi-cycle");
    repeat (3) @(posedge clk);
    #1; check(dw.b && acb_req, "Busy and bus request held between cycles");
    @(negedge clk); acb_grant = 0;            // grant no longer needed in hold
    start = 1; n = 5'd6; a = 0; f = 0; do_z = 0; do_c = 0; short_cyc = 0;
    @(negedge clk); start = 0;
    repeat (25) @(posedge clk);
    check(r == resp_of(5'd6, 4'd0, 5'd0), "second multi-cycle ran without a grant");
    @(negedge clk); mc = 0;
    @(negedge clk); @(negedge clk);
    check(!dw.b && !acb_req, "bus released when MC clears");
    finish_tb();
  end
endmodule
