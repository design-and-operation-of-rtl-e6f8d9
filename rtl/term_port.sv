// term_port: the terminal port of the processor board, an asynchronous
// serial line with four Q-bus registers.
//
//   177560 RCSR  bit 7 receiver done (read only), bit 6 receive interrupt
//                enable; every other bit reads as 1
//   177562 RBUF  received character in bits 7:0 (reading clears done)
//   177564 XCSR  bit 7 transmit buffer empty (1 = empty, 0 = full, read
//                only); every other bit reads as 1
//   177566 XBUF  character to send in bits 7:0
//
// Characters are 8 data bits, no parity, with one start and two stop bits,
// least significant bit first; both stop bits are checked, and a missing
// stop bit (a framing error, such as a BREAK) asserts the processor's HALT
// line (`halt`) until a correctly framed character arrives.  With done and
// the enable set the port requests the keyboard interrupt at vector 60.
// The baud rate comes from the four rate switches (`baud_sw` = switches
// 4..1, closed = 0) with the document's table: 0010 110, 0101 300,
// 0111 1200, 1010 2400, 1100 4800, 1110 9600 baud; codes the table does not
// list give 9600 (this design's choice).  All registers clear on power-up or
// RESET.
//
// The receiver samples each bit in the middle of its bit time, found by
// counting from the falling edge of the start bit; the line level drivers
// (EIA, 20 mA, TTL) are outside the logic.
module term_port
  import acc_pkg::*;
#(
  parameter int unsigned CLK_HZ = 20_000_000
) (
  input  logic      clk,
  input  logic      rst,
  input  qbus_req_t req,
  output qbus_rsp_t rsp,
  input  logic [3:0] baud_sw,
  input  logic      rxd,
  output logic      txd,
  output logic      rx_irq,
  output logic      halt
);
  function automatic int unsigned bit_clocks(input logic [3:0] sw);
    case (sw)
      4'b0010: return CLK_HZ / 110;
      4'b0101: return CLK_HZ / 300;
      4'b0111: return CLK_HZ / 1200;
      4'b1010: return CLK_HZ / 2400;
      4'b1100: return CLK_HZ / 4800;
      default: return CLK_HZ / 9600;
    endcase
  endfunction

  wire [31:0] nbit = 32'(bit_clocks(baud_sw));

  // ---------------- registers ----------------
  logic       rx_done, rx_ie, tx_empty;
  logic [7:0] rbuf, xbuf;
  logic       tx_start;
  logic       done;

  wire   cyc    = req.sync && (req.din || req.dout) && !done;
  wire   a_rcsr = (req.addr[15:0] == A_RCSR);
  wire   a_rbuf = (req.addr[15:0] == A_RBUF);
  wire   a_xcsr = (req.addr[15:0] == A_XCSR);
  wire   a_xbuf = (req.addr[15:0] == A_XBUF);
  wire   sel    = cyc && (a_rcsr || a_rbuf || a_xcsr || a_xbuf);

  // ---------------- receiver ----------------
  typedef enum logic [1:0] { R_IDLE, R_START, R_DATA, R_STOP } rx_state_e;
  rx_state_e   rs;
  logic [31:0] rcnt;
  logic [3:0]  rbit;
  logic [7:0]  rsh;
  logic        rxs1, rxs2;   // input synchroniser
  logic        rx_new;       // character complete, well framed
  logic [7:0]  rx_char;

  always_ff @(posedge clk) begin
    if (rst) begin
      rs <= R_IDLE; rcnt <= '0; rbit <= '0; rsh <= '0;
      rxs1 <= 1'b1; rxs2 <= 1'b1; rx_new <= 1'b0; rx_char <= '0; halt <= 1'b0;
    end else begin
      rxs1   <= rxd;
      rxs2   <= rxs1;
      rx_new <= 1'b0;
      case (rs)
        R_IDLE: if (!rxs2) begin rs <= R_START; rcnt <= '0; end
        R_START: begin
          if (rcnt >= (nbit >> 1)) begin
            rcnt <= '0;
            if (!rxs2) begin rs <= R_DATA; rbit <= '0; end
            else rs <= R_IDLE;          // glitch, not a start bit
          end else rcnt <= rcnt + 1;
        end
        R_DATA: begin
          if (rcnt >= nbit - 1) begin
            rcnt <= '0;
            rsh  <= {rxs2, rsh[7:1]};
            if (rbit == 4'd7) begin rs <= R_STOP; rbit <= '0; end
            else rbit <= rbit + 4'd1;
          end else rcnt <= rcnt + 1;
        end
        R_STOP: begin
          if (rcnt >= nbit - 1) begin
            rcnt <= '0;
            if (!rxs2) begin               // framing error
              halt <= 1'b1;
              rs   <= R_IDLE;
            end else if (rbit == 4'd1) begin
              halt    <= 1'b0;
              rx_new  <= 1'b1;
              rx_char <= rsh;
              rs      <= R_IDLE;
            end else rbit <= rbit + 4'd1;
          end else rcnt <= rcnt + 1;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  // ---------------- transmitter ----------------
  logic [10:0] tsh;      // start, 8 data, 2 stop
  logic [3:0]  tleft;
  logic [31:0] tcnt;
  logic        tbusy;

  always_ff @(posedge clk) begin
    if (rst) begin
      tsh <= '1; tleft <= '0; tcnt <= '0; tbusy <= 1'b0; txd <= 1'b1;
    end else if (!tbusy) begin
      txd <= 1'b1;
      if (tx_start) begin
        tsh   <= {2'b11, xbuf, 1'b0};
        tleft <= 4'd11;
        tcnt  <= '0;
        tbusy <= 1'b1;
      end
    end else begin
      txd <= tsh[0];
      if (tcnt >= nbit - 1) begin
        tcnt  <= '0;
        tsh   <= {1'b1, tsh[10:1]};
        tleft <= tleft - 4'd1;
        if (tleft == 4'd1) tbusy <= 1'b0;
      end else tcnt <= tcnt + 1;
    end
  end

  // ---------------- bus side ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      rx_done <= 1'b0; rx_ie <= 1'b0; tx_empty <= 1'b1; rbuf <= '0; xbuf <= '0;
      tx_start <= 1'b0; done <= 1'b0; rsp <= QBUS_RSP_IDLE;
    end else begin
      rsp      <= QBUS_RSP_IDLE;
      tx_start <= 1'b0;
      if (rx_new) begin rx_done <= 1'b1; rbuf <= rx_char; end
      // the buffer reads empty again once the character has been sent
      if (tx_start) tx_empty <= 1'b0;
      else if (!tx_empty && !tbusy && !tx_start) tx_empty <= 1'b1;
      if (!req.sync) done <= 1'b0;
      else if (sel) begin
        done     <= 1'b1;
        rsp.rply <= 1'b1;
        if (req.din) begin
          unique case (1'b1)
            a_rcsr: rsp.rdata <= {8'hFF, rx_done, rx_ie, 6'h3F};
            a_rbuf: begin rsp.rdata <= {8'h00, rbuf}; if (!rx_new) rx_done <= 1'b0; end
            a_xcsr: rsp.rdata <= {8'hFF, tx_empty, 7'h7F};
            default: rsp.rdata <= 16'h0;
          endcase
        end
        if (req.dout) begin
          if (a_rcsr) rx_ie <= req.wdata[6];
          if (a_xbuf && tx_empty) begin xbuf <= req.wdata[7:0]; tx_start <= 1'b1; end
        end
      end
    end
  end

  assign rx_irq = rx_done && rx_ie;
endmodule
