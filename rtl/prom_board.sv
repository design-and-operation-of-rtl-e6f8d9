// prom_board: the 450-ns PROM board (2K x 8 UV-erasable PROMs), 4K or 8K
// words, with its base address set by a DIP switch.
//
// The switch decoding is the same as that of the static RAM board:
// switches 1-5 give the base address and switch 6 the size (1 = 4K,
// 0 = 8K), closed meaning logic 0.  The contents are the user's program,
// read from INIT_FILE (hex, word 0 at the base address).  Writes are answered
// but change nothing.  The 450-ns cycle is modelled as a reply after
// LATENCY = 9 clocks of 50 ns.
//
// Interface: the extended Q-bus request in, a one-clock reply out.
module prom_board
  import acc_pkg::*;
#(
  parameter logic [1:6] SW        = 6'b00010_1,   // 4K words at 040000
  parameter string      INIT_FILE = "",
  parameter int         LATENCY   = 9
) (
  input  logic      clk,
  input  logic      rst,
  input  qbus_req_t req,
  output qbus_rsp_t rsp
);
  wire sel = SW[6] ? (req.addr[17:13] == SW[1:5])
                   : (req.addr[17:14] == SW[1:4]);

  qbus_req_t lreq;
  always_comb begin
    lreq = req;
    if (SW[6]) lreq.addr[13] = 1'b0;
  end

  qbus_mem #(.WORDS(8192), .LATENCY(LATENCY), .READ_ONLY(1'b1), .INIT_FILE(INIT_FILE)) u_mem (
    .clk, .rst, .req(lreq), .sel, .rsp
  );
endmodule
