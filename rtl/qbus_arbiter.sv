// qbus_arbiter: DMA arbitration of the ACC's processor bus.
//
// On the real bus the processor grants DMA through a daisy chain (BDMR
// request, BDMG grant passed from board to board); a board nearer the
// processor wins.  Here the chain is a fixed priority: master 0 first.  A
// grant is given only when no grant is active and the processor has no bus
// cycle in progress (`cpu_sync` low), and it stays with the master until
// that master drops its request (bus hold, as the SPU needs for a whole
// microprogram).  The processor must not start a cycle while `dma_active`
// is high.  `other_req` and `other_master` tell each master whether some
// other device requests or owns the bus (the Access Port reports both).
// Grants are registered: one clock from request to grant.
module qbus_arbiter #(
  parameter int NM = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cpu_sync,
  input  logic [NM-1:0] dmr,
  output logic [NM-1:0] dmg,
  output logic          dma_active,
  output logic [NM-1:0] other_req,
  output logic [NM-1:0] other_master
);
  always_ff @(posedge clk) begin
    if (rst) dmg <= '0;
    else if (dmg != '0) begin
      if ((dmg & dmr) == '0) dmg <= '0;       // holder released the bus
    end else if (!cpu_sync) begin
      for (int k = NM - 1; k >= 0; k--)
        if (dmr[k]) dmg <= NM'(1) << k;
    end
  end

  assign dma_active = (dmg != '0);

  always_comb
    for (int k = 0; k < NM; k++) begin
      other_req[k]    = (dmr & ~(NM'(1) << k)) != '0;
      other_master[k] = ((dmg & ~(NM'(1) << k)) != '0) || cpu_sync;
    end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(dmg));
endmodule
