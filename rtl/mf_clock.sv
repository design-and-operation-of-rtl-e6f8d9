// mf_clock: the multifrequency clock of the processor board.
//
// A free-running 16-bit counter advances once per clock tick, 100 Hz or
// 1000 Hz chosen by a switch (`sel_1khz`), and can be read at 177574 (octal)
// on every page to measure elapsed time.  When the clock interrupt enable
// CIE (bit 6 of the page control register) is set, every tick also pulses
// the processor's EVENT interrupt line (`evnt`, vector 100).  The counter
// clears on power-up or RESET.
//
// The board makes the ticks with adjustable free-running oscillators; here
// they come from dividing the 20-MHz model clock by DIV_100HZ or DIV_1KHZ.
// Writes to the counter are answered and ignored (the document only
// describes reading it), so the write-data bits of the request are unused.
//
// Interface: Q-bus request/reply as every slave, `cie` in, `evnt` out (one
// clock per tick).  A read is answered one clock after it starts.
module mf_clock
  import acc_pkg::*;
#(
  parameter int unsigned DIV_100HZ = 200_000,
  parameter int unsigned DIV_1KHZ  = 20_000
) (
  input  logic      clk,
  input  logic      rst,
  input  qbus_req_t req,
  output qbus_rsp_t rsp,
  input  logic      sel_1khz,
  input  logic      cie,
  output logic      evnt
);
  logic [31:0] div_cnt;
  logic [15:0] count;
  logic        done;
  wire  [31:0] div_max = sel_1khz ? DIV_1KHZ - 1 : DIV_100HZ - 1;
  wire         tick    = (div_cnt >= div_max);
  wire         sel     = req.sync && (req.addr[15:0] == A_CLOCK) && (req.din || req.dout) && !done;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt <= '0;
      count   <= '0;
      evnt    <= 1'b0;
      done    <= 1'b0;
      rsp     <= QBUS_RSP_IDLE;
    end else begin
      div_cnt <= tick ? '0 : div_cnt + 32'd1;
      if (tick) count <= count + 16'd1;
      evnt <= tick && cie;
      rsp  <= QBUS_RSP_IDLE;
      if (!req.sync) done <= 1'b0;
      else if (sel) begin
        done      <= 1'b1;
        rsp.rply  <= 1'b1;
        rsp.rdata <= req.din ? count : 16'h0;
      end
    end
  end
endmodule
