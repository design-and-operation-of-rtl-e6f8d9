// sram_board: the 200-ns static RAM board, 4K or 8K words, with its base
// address set by a DIP switch.
//
// Switches 1-5 give the base address and switch 6 the size (open = 1 = 4K,
// closed = 0 = 8K), closed meaning logic 0.  With 4K words the board answers
// when address bits 17:13 equal switches 1-5, so it can start on any
// 20000 (octal) boundary; with 8K words bits 17:14 are compared with switches
// 1-4 and switch 5 is ignored.  These decodings reproduce the document's
// switch tables.  The reply comes LATENCY = 11 clocks (550 ns) after the
// request, so that a whole bus cycle lasts about the 575 ns of bus
// synchronisation the document measured with this 200-ns memory.
//
// Interface: the extended Q-bus request in, a one-clock reply out.
module sram_board
  import acc_pkg::*;
#(
  parameter logic [1:6] SW      = 6'b00100_1,   // 4K words at 100000
  parameter int         LATENCY = 11
) (
  input  logic      clk,
  input  logic      rst,
  input  qbus_req_t req,
  output qbus_rsp_t rsp
);
  wire sel = SW[6] ? (req.addr[17:13] == SW[1:5])
                   : (req.addr[17:14] == SW[1:4]);

  // word index: 12 bits for 4K, 13 bits for 8K
  qbus_req_t lreq;
  always_comb begin
    lreq = req;
    if (SW[6]) lreq.addr[13] = 1'b0;
  end

  qbus_mem #(.WORDS(8192), .LATENCY(LATENCY), .READ_ONLY(1'b0)) u_mem (
    .clk, .rst, .req(lreq), .sel, .rsp
  );
endmodule
