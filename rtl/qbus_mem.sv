// qbus_mem: word memory behind a Q-bus slave reply, shared by the memory
// boards of the controller.
//
// The board that instantiates it does the address decoding and drives `sel`;
// this module answers a selected DATI or DATO after LATENCY clocks with a
// one-clock reply, as the Q-bus slave does once its memory access is over.
// READ_ONLY boards ignore writes but still reply.  Word index is the byte
// address divided by two, taken modulo WORDS.  Contents start at zero or,
// if INIT_FILE is given, are read from that hex file.
//
// The latency of each board is this design's choice, set so that faster
// memories reply in fewer clocks.
module qbus_mem
  import acc_pkg::*;
#(
  parameter int    WORDS     = 1024,
  parameter int    LATENCY   = 1,
  parameter bit    READ_ONLY = 1'b0,
  parameter string INIT_FILE = ""
) (
  input  logic      clk,
  input  logic      rst,
  input  qbus_req_t req,
  input  logic      sel,
  output qbus_rsp_t rsp
);
  localparam int AW = $clog2(WORDS);

  logic [15:0] mem [WORDS];
  logic [7:0]  wait_cnt;
  logic        done;

  initial begin
    for (int k = 0; k < WORDS; k++) mem[k] = 16'h0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  wire [AW-1:0] widx = req.addr[AW:1];
  wire          act  = req.sync && sel && (req.din || req.dout) && !done;

  always_ff @(posedge clk) begin
    if (rst) begin
      wait_cnt <= '0;
      done     <= 1'b0;
      rsp      <= QBUS_RSP_IDLE;
    end else begin
      rsp <= QBUS_RSP_IDLE;
      if (!req.sync) begin
        done     <= 1'b0;
        wait_cnt <= '0;
      end else if (act) begin
        if (int'(wait_cnt) + 1 >= LATENCY) begin
          done     <= 1'b1;
          rsp.rply <= 1'b1;
          if (req.din) rsp.rdata <= mem[widx];
          if (req.dout && !READ_ONLY) mem[widx] <= req.wdata;
        end else begin
          wait_cnt <= wait_cnt + 8'd1;
        end
      end
    end
  end
endmodule
