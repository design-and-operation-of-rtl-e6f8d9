// cp_lam: the two LAM paths of the Control Port.
//
// Path 1 (processor interrupts, enabled by EI1): the 23 LAM lines L1-L23 are
// priority encoded, L1 highest, into a 5-bit code: 0 when no LAM is set,
// otherwise 24 - n for the highest-priority LAM Ln (L23 gives 1, L1 gives
// 23).  The code addresses a 64 x 1 mask RAM; when the addressed bit is 1
// the port requests an interrupt with vector 400 + 4*code (octal 400 is the
// error vector, 404 is L23, 534 is L1), exactly the document's table.  As
// the mask is addressed by the encoded pattern, a masked-off LAM also hides
// any lower-priority one behind it.
//
// Path 2 (SPU LAM bus, enabled by EI2): six LAM lines chosen by a patch
// (parameter SL_STATION) form a 6-bit pattern that addresses a second 64 x 1
// mask RAM; when the addressed bit is 1 the six LAMs are driven onto the six
// special LAM lines of the ACC bus, where the SPU can test them.  With board
// switch 4 closed (`sw4_open` = 0) every pattern is enabled.  The lines
// follow a LAM within one clock (50 ns; the document asks for 100 ns).
//
// Mask access: the Control Port writes or reads one bit at a 6-bit location.
// A mask is written only while its path's enable (EI1 or EI2) is set, as the
// document asks users to do; gating the write with the enable is this
// design's reading of that rule.  Masks are not cleared by reset.
module cp_lam
  import acc_pkg::*;
#(
  parameter int SL_STATION [6] = '{1, 2, 3, 4, 5, 6}
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [23:0] lam,        // lam[k] = L(k+1)
  input  logic        ei1,
  input  logic        ei2,
  input  logic        sw4_open,
  // mask RAM access
  input  logic        m_we,
  input  logic        m_sel2,     // 0: interrupt mask, 1: SPU-LAM mask
  input  logic [5:0]  m_addr,
  input  logic        m_wbit,
  output logic        m_rbit,
  // path 1
  output logic        irq,
  output logic [8:0]  vector,
  output logic [4:0]  code,
  // path 2
  output logic [5:0]  sl          // sl[k] = special LAM k+1
);
  logic [63:0] mask1, mask2;
  logic [5:0]  pattern;

  // priority encoder, L1 highest
  always_comb begin
    code = 5'd0;
    for (int k = 22; k >= 0; k--)
      if (lam[k]) code = 5'(23 - k);
  end

  always_comb
    for (int j = 0; j < 6; j++) pattern[j] = lam[SL_STATION[j] - 1];

  always_ff @(posedge clk) begin
    if (m_we) begin
      if (!m_sel2 && ei1) mask1[m_addr] <= m_wbit;
      if ( m_sel2 && ei2) mask2[m_addr] <= m_wbit;
    end
  end

  assign m_rbit = m_sel2 ? mask2[m_addr] : mask1[m_addr];
  assign vector = VEC_LAM_BASE + {2'b00, code, 2'b00};
  assign irq    = ei1 && (code != 5'd0) && mask1[{1'b0, code}];

  always_ff @(posedge clk) begin
    if (rst) sl <= '0;
    else     sl <= (ei2 && (mask2[pattern] || !sw4_open)) ? pattern : 6'b0;
  end
endmodule
