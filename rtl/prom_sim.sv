// prom_sim: the SPU PROM simulator, a CAMAC module holding a 512 x 40
// static RAM that stands in for the SPU's control-memory PROMs while
// microcode is being developed.
//
// The RAM is seen two ways.  Towards the SPU it is one 512 x 40 memory: the
// SPU's next-address lines (`cm_addr`) select a word that is returned whole
// on `cm_data`, as over the simulator's 20-pin address and 40-pin data
// connectors.  Towards the Dataway it is five 512 x 8 banks (bank k = SPU
// bits 8k+7..8k, "PROM k"), loaded one byte at a time by the crate
// controller through a 12-bit memory address register (MAR): W12-W10 select
// the bank (0-4) and W9-W1 the word.
//   A0 F16  write MAR and enter CAMAC access mode
//   A0 F0   read MAR (R12-R1) and leave CAMAC access mode
//   A1 F16  write W8-W1 into the selected bank at MAR, then MAR += 1
//   A1 F0   read the selected bank at MAR on R8-R1, then MAR += 1
// X = 1 for these four; Z (with S2) clears MAR and access mode.  The RAM
// serves either the Dataway or the SPU: in access mode the SPU is given an
// all-zero microword (JZ with no control), so it idles at address 0 instead
// of running a half-loaded program.  Power-up/RESET clears MAR and enters
// access mode, since the RAM then holds nothing valid (this design's
// choice; the controller leaves the mode by reading MAR).  While an
// A1 command holds Busy the simulator asserts Test Inhibit, which stops the
// SPU.  Data is taken at S1 and MAR changes at the start of S2.  Bank codes 5-7 write
// nothing and read 0 (this design's choice).  The RAM is not cleared by
// reset.  SPU address lines 10-9 are not used by the 512-word RAM, and the
// Dataway I and C lines play no part here, so those input bits are unread.
module prom_sim
  import acc_pkg::*;
#(
  parameter int SIM_STATION = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  dw_cmd_t     dw,
  output dw_rsp_t     dw_rsp,
  input  logic [10:0] cm_addr,
  output logic [39:0] cm_data,
  output logic        test_inhibit,
  output logic        access_mode
);
  logic [39:0] ram [512];
  logic [11:0] mar;

  wire       sel   = dw.n[SIM_STATION-1];
  wire [2:0] bank  = mar[11:9];
  wire [8:0] word  = mar[8:0];
  wire       bank_ok = (bank <= 3'd4);
  wire c_wmar = sel && dw.a == 4'd0 && dw.f == 5'd16;
  wire c_rmar = sel && dw.a == 4'd0 && dw.f == 5'd0;
  wire c_wmem = sel && dw.a == 4'd1 && dw.f == 5'd16;
  wire c_rmem = sel && dw.a == 4'd1 && dw.f == 5'd0;

  wire [39:0] rword = ram[word];
  logic [7:0] rbyte;
  always_comb begin
    rbyte = 8'h00;
    if (bank_ok) rbyte = rword[8*bank +: 8];
  end

  always_comb begin
    dw_rsp   = DW_RSP_IDLE;
    dw_rsp.x = c_wmar || c_rmar || c_wmem || c_rmem;
    if (c_rmar) dw_rsp.r[11:0] = mar;
    if (c_rmem) dw_rsp.r[7:0]  = rbyte;
  end

  // S2 lasts several clocks: act once, on its leading edge
  logic s2_q;
  wire  s2_edge = dw.s2 && !s2_q;
  always_ff @(posedge clk) s2_q <= rst ? 1'b0 : dw.s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      mar <= '0;
      access_mode <= 1'b1;
    end else if (dw.z && s2_edge) begin
      mar <= '0;
      access_mode <= 1'b0;
    end else if (s2_edge) begin
      if (c_wmar) begin mar <= dw.w[11:0]; access_mode <= 1'b1; end
      if (c_rmar) access_mode <= 1'b0;
      if (c_wmem || c_rmem) mar <= mar + 12'd1;
    end
  end

  // byte write at S1
  always_ff @(posedge clk)
    if (dw.s1 && c_wmem && bank_ok) ram[word][8*bank +: 8] <= dw.w[7:0];

  // in CAMAC access mode the RAMs belong to the Dataway side: the SPU reads
  // an all-zero word (JZ, no control), which parks it at address 0
  assign cm_data      = access_mode ? 40'h0 : ram[cm_addr[8:0]];
  assign test_inhibit = sel && (dw.a == 4'd1) && dw.b;
endmodule
