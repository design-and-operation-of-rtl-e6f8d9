// page_ctl: memory page control register of the processor board.
//
// The processor produces 16-bit addresses; this register supplies the two
// extension bits PE1:PE0 that place every bus cycle in one of four 32K-word
// pages (page n starts at n*200000 octal), so the controller reaches 128K
// words of memory and can hold several Control Ports and Special Processor
// Units.  The register answers at 177570 (octal) on every page.  Bit layout,
// from the document's register diagram: bit 0 PE0, bit 1 PE1, bit 6 CIE (the
// multifrequency clock's interrupt enable, kept in this register to save
// board space).  Unused bits read as 0 (the document does not say) and the
// register clears on power-up, RESET or bus INIT.
//
// Interface: the extended Q-bus request in, a reply one clock after a
// selected cycle starts; `page` and `cie` are the register outputs.
module page_ctl
  import acc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  qbus_req_t  req,
  output qbus_rsp_t  rsp,
  output logic [1:0] page,
  output logic       cie
);
  logic done;
  wire  sel = req.sync && (req.addr[15:0] == A_PAGE_CSR) && (req.din || req.dout) && !done;

  always_ff @(posedge clk) begin
    if (rst) begin
      page <= 2'b00;
      cie  <= 1'b0;
      done <= 1'b0;
      rsp  <= QBUS_RSP_IDLE;
    end else begin
      rsp <= QBUS_RSP_IDLE;
      if (!req.sync) done <= 1'b0;
      else if (sel) begin
        done     <= 1'b1;
        rsp.rply <= 1'b1;
        if (req.din) rsp.rdata <= {9'b0, cie, 4'b0, page};
        if (req.dout) begin
          page <= req.wdata[1:0];
          cie  <= req.wdata[6];
        end
      end
    end
  end
endmodule
