// fast_ram: the 50-ns 1K-word fast RAM board for front-end data buffering,
// with its base address set by a DIP switch.
//
// Switches 1 and 2 select the address page (bits 17:16), switch 3 low or
// high memory in the page (bit 15) and switches 4 and 5 the 1K boundary
// (bits 12:11); bits 14:13 must be zero.  This reproduces the document's
// switch table (closed = logic 0).  The reply comes LATENCY = 4 clocks
// (200 ns) after the request, so that a whole bus cycle lasts about the
// 225 ns of bus synchronisation the document measured with this board.
//
// Interface: the extended Q-bus request in, a one-clock reply out.
module fast_ram
  import acc_pkg::*;
#(
  parameter logic [1:5] SW      = 5'b00001,   // 004000 on page 0
  parameter int         LATENCY = 4
) (
  input  logic      clk,
  input  logic      rst,
  input  qbus_req_t req,
  output qbus_rsp_t rsp
);
  wire sel = (req.addr[17:15] == SW[1:3]) && (req.addr[14:13] == 2'b00) &&
             (req.addr[12:11] == SW[4:5]);

  qbus_mem #(.WORDS(1024), .LATENCY(LATENCY), .READ_ONLY(1'b0)) u_mem (
    .clk, .rst, .req, .sel, .rsp
  );
endmodule
