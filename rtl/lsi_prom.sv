// lsi_prom: the 1K-word boot PROM on the processor board, at byte addresses
// 170000-173776 (octal) of address page 0 only.
//
// The bootstrap program starts at 173000, where the processor goes after a
// RESET; the rest is free for the system designer.  The contents are the
// user's program and are loaded from INIT_FILE (hex, one word per line,
// word 0 = address 170000).  Writes are answered but change nothing.  The
// reply latency is this design's choice.
//
// Interface: the extended Q-bus request in, a one-clock reply out.
module lsi_prom
  import acc_pkg::*;
#(
  parameter string INIT_FILE = "",
  parameter int    LATENCY   = 6
) (
  input  logic      clk,
  input  logic      rst,
  input  qbus_req_t req,
  output qbus_rsp_t rsp
);
  // page 0, byte addresses 170000-173776: bits 15:11 = 11110
  wire sel = (req.addr[17:16] == 2'b00) && (req.addr[15:11] == 5'b11110);

  qbus_mem #(.WORDS(1024), .LATENCY(LATENCY), .READ_ONLY(1'b1), .INIT_FILE(INIT_FILE)) u_mem (
    .clk, .rst, .req, .sel, .rsp
  );
endmodule
