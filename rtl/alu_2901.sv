// alu_2901: the SPU's 16-bit arithmetic unit, four cascaded 4-bit
// Am2901A-style slices with look-ahead carry, treated here as one 16-bit
// unit.
//
// A nine-bit instruction chooses the operands, the operation and where the
// result goes, as in the 2901:
//   I2-I0 source (R,S): 0 A,Q  1 A,B  2 0,Q  3 0,B  4 0,A  5 D,A  6 D,Q  7 D,0
//   I5-I3 function: 0 R+S  1 S-R  2 R-S  3 R|S  4 R&S  5 ~R&S  6 R^S  7 ~(R^S)
//         (subtraction is the complement sum, so S-R needs carry-in 1)
//   I8-I6 destination: 0 F->Q  1 none  2 F->B, Y=A  3 F->B  4 F/2->B, Q/2->Q
//         5 F/2->B  6 2F->B, 2Q->Q  7 2F->B
// A and B address a 16 x 16 two-port register file, Q is the extra working
// register and D the direct data input.  The document only names the part
// and its fields and refers to the maker's data book; this table is the
// part's usual one.
//
// The bits shifted in are chosen by the SPU's shift control (`shmode`):
// zero fill, one fill, rotate, or arithmetic (sign kept on a right shift,
// zero fill on a left shift).  For the double shifts F and Q are joined into
// one 32-bit word.  These fill rules are this design's reading of the
// document's four shift functions.
//
// Flags come from F: zero, negative (F15), carry out, overflow (signed, for
// the arithmetic functions; 0 for the logic ones) and F0.  Register file
// and Q change on the clock when `ce` is set; Y and the flags are
// combinational.
module alu_2901
  import acc_pkg::*;
(
  input  logic        clk,
  input  logic        ce,
  input  logic [8:0]  i,
  input  logic [3:0]  a_addr,
  input  logic [3:0]  b_addr,
  input  logic [15:0] d,
  input  logic        cin,
  input  shift_mode_e shmode,
  output logic [15:0] y,
  output logic        f_zero,
  output logic        f_neg,
  output logic        f_cout,
  output logic        f_ovr,
  output logic        f_lsb
);
  logic [15:0] ram [16];
  logic [15:0] q;

  wire [15:0] ad = ram[a_addr];
  wire [15:0] bd = ram[b_addr];

  logic [15:0] r, s, f;
  logic [16:0] sum;

  always_comb begin
    unique case (i[2:0])
      3'd0: begin r = ad;    s = q;     end
      3'd1: begin r = ad;    s = bd;    end
      3'd2: begin r = '0;    s = q;     end
      3'd3: begin r = '0;    s = bd;    end
      3'd4: begin r = '0;    s = ad;    end
      3'd5: begin r = d;     s = ad;    end
      3'd6: begin r = d;     s = q;     end
      default: begin r = d;  s = '0;    end
    endcase
    sum   = '0;
    f_ovr = 1'b0;
    unique case (i[5:3])
      3'd0: begin sum = {1'b0, r} + {1'b0, s} + 17'(cin);
                  f_ovr = (r[15] == s[15]) && (sum[15] != r[15]); end
      3'd1: begin sum = {1'b0, s} + {1'b0, ~r} + 17'(cin);
                  f_ovr = (s[15] != r[15]) && (sum[15] != s[15]); end
      3'd2: begin sum = {1'b0, r} + {1'b0, ~s} + 17'(cin);
                  f_ovr = (r[15] != s[15]) && (sum[15] != r[15]); end
      3'd3: sum = {1'b0, r | s};
      3'd4: sum = {1'b0, r & s};
      3'd5: sum = {1'b0, ~r & s};
      3'd6: sum = {1'b0, r ^ s};
      default: sum = {1'b0, ~(r ^ s)};
    endcase
    f      = sum[15:0];
    f_cout = (i[5:3] <= 3'd2) ? sum[16] : 1'b0;
    f_zero = (f == '0);
    f_neg  = f[15];
    f_lsb  = f[0];
    y      = (i[8:6] == 3'd2) ? ad : f;
  end

  // shifter inputs
  logic ram15_in, ram0_in, q15_in, q0_in;
  always_comb begin
    unique case (shmode)
      SH_ZERO:  begin ram15_in = 1'b0; ram0_in = 1'b0; q0_in = 1'b0; end
      SH_ONE:   begin ram15_in = 1'b1; ram0_in = 1'b1; q0_in = 1'b1; end
      SH_ROT:   begin ram15_in = (i[8:6] == 3'd4) ? q[0] : f[0];
                      ram0_in  = f[15]; q0_in = f[15]; end
      default:  begin ram15_in = f[15]; ram0_in = 1'b0; q0_in = 1'b0; end
    endcase
    q15_in = f[0];
    if (i[8:6] == 3'd6) ram0_in = q[15];   // double left shift: Q15 into F0
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      unique case (i[8:6])
        3'd0: q <= f;
        3'd1: ;
        3'd2, 3'd3: ram[b_addr] <= f;
        3'd4: begin ram[b_addr] <= {ram15_in, f[15:1]}; q <= {q15_in, q[15:1]}; end
        3'd5: ram[b_addr] <= {ram15_in, f[15:1]};
        3'd6: begin ram[b_addr] <= {f[14:0], ram0_in}; q <= {q[14:0], q0_in}; end
        default: ram[b_addr] <= {f[14:0], ram0_in};
      endcase
    end
  end
endmodule
