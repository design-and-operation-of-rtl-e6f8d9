// lsi_ram: the 1K-word RAM on the processor board, at byte addresses
// 0-3776 (octal) of address page 0 only.
//
// It holds the trap and interrupt vectors and the stack, so that every
// configuration has memory at the bottom of the address space.  A board
// switch (ENABLE) can take it off the bus so that another memory board may
// be placed at 0.  The document gives the size, the address range, the page
// restriction and the disable switch; the reply latency (LATENCY clocks of
// 50 ns) is this design's choice.
//
// Interface: the extended Q-bus request in, a one-clock reply out.
module lsi_ram
  import acc_pkg::*;
#(
  parameter bit ENABLE  = 1'b1,
  parameter int LATENCY = 6
) (
  input  logic      clk,
  input  logic      rst,
  input  qbus_req_t req,
  output qbus_rsp_t rsp
);
  // page 0, byte addresses 000000-003776
  wire sel = ENABLE && (req.addr[17:11] == 7'b0);

  qbus_mem #(.WORDS(1024), .LATENCY(LATENCY), .READ_ONLY(1'b0)) u_mem (
    .clk, .rst, .req, .sel, .rsp
  );
endmodule
