// mcu_2910: the SPU's micro-sequencer (an Am2910-style microprogram
// controller), which chooses the address of the next microinstruction.
//
// Each clock with `ce` set it drives Y, the next control-memory address,
// from one of four sources: the microprogram counter (uPC), the direct
// input D (branch address field, or the CSR start address for CJV), the
// register/counter R, or the top of a five-word stack F.  The sixteen
// functions follow the document's function table exactly, including the
// stack and counter effects (push, pop, clear, load, decrement) and the
// PASS/FAIL choice made by `pass`.  uPC then takes Y plus the carry-in:
// `ci` = 1 increments (the document's PCIN = 0), `ci` = 0 passes the address
// unchanged (PCIN = 1), which lets an instruction wait in place.
//
// A push onto a full stack overwrites the top word and a pop of an empty
// stack leaves it empty, as in the Am2910.  The address is AW = 11 bits
// wide (the document uses 11 of the part's 12).  Y is combinational from the
// current state; everything else changes on the clock.
module mcu_2910
  import acc_pkg::*;
#(
  parameter int AW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ce,
  input  mcu_fn_e       fn,
  input  logic          pass,
  input  logic          ci,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] y,
  output logic          full
);
  localparam int DEPTH = 5;

  logic [AW-1:0] upc, r;
  logic [AW-1:0] stk [DEPTH];
  logic [2:0]    sp;          // number of words on the stack
  wire  [AW-1:0] tos = (sp == 3'd0) ? '0 : stk[sp - 3'd1];
  wire           r_zero = (r == '0);

  typedef enum logic [1:0] { S_HOLD, S_PUSH, S_POP, S_CLEAR } stk_op_e;
  typedef enum logic [1:0] { R_HOLD, R_LOAD, R_DEC } r_op_e;
  stk_op_e sop;
  r_op_e   rop;

  always_comb begin
    y   = upc;
    sop = S_HOLD;
    rop = R_HOLD;
    unique case (fn)
      JZ:   begin y = '0; sop = S_CLEAR; end
      CJS:  if (pass) begin y = d; sop = S_PUSH; end
      JMP:  y = d;
      CJP:  if (pass) y = d;
      PUSH: begin sop = S_PUSH; if (pass) rop = R_LOAD; end
      JSRP: begin y = pass ? d : r; sop = S_PUSH; end
      CJV:  if (pass) y = d;
      JRP:  y = pass ? d : r;
      RFCT: if (!r_zero) begin y = tos; rop = R_DEC; end
            else sop = S_POP;
      RPCT: if (!r_zero) begin y = d; rop = R_DEC; end
      CRTN: if (pass) begin y = tos; sop = S_POP; end
      CJPP: if (pass) begin y = d; sop = S_POP; end
      LDCT: rop = R_LOAD;
      LOOP: if (!pass) y = tos; else sop = S_POP;
      CONT: ;
      TWB: begin
        if (!r_zero) begin
          rop = R_DEC;
          if (!pass) y = tos; else sop = S_POP;
        end else begin
          sop = S_POP;
          if (!pass) y = d;
        end
      end
    endcase
  end

  assign full = (sp == 3'(DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      upc <= '0;
      r   <= '0;
      sp  <= '0;
      for (int k = 0; k < DEPTH; k++) stk[k] <= '0;
    end else if (ce) begin
      upc <= y + AW'(ci);
      unique case (rop)
        R_LOAD: r <= d;
        R_DEC:  r <= r - 1'b1;
        default: ;
      endcase
      unique case (sop)
        S_PUSH: begin
          if (sp == 3'(DEPTH)) stk[DEPTH-1] <= upc;
          else begin stk[sp] <= upc; sp <= sp + 3'd1; end
        end
        S_POP:   if (sp != 3'd0) sp <= sp - 3'd1;
        S_CLEAR: sp <= '0;
        default: ;
      endcase
    end
  end
endmodule
