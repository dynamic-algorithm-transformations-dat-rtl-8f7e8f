// next_canceller: the signal processing (SPA) block of the DAT-based NEXT
// canceller for a 155.52 Mb/s 64-CAP ATM-LAN receiver.
//
// The local transmitter's symbols a = ar + j*ai are filtered by the
// reconfigurable strength-reduced complex adaptive filter (sr_fblock) to
// estimate the near-end crosstalk in the received sample r = rr + j*ri. The
// estimate is removed (u = r - y) and each dimension of u goes through a
// 64-CAP slicer. The slicer error e = u - decision adapts the coefficients
// in sr_wud with the complex LMS rule; with correct decisions e equals
// (r - far-end symbol) - y, the canceller's own error.
//
// Control inputs (from the SMA): alpha (tap on), beta (tap update on),
// prec_red (coefficient LSBs forced to zero). rd_idx selects one tap whose
// F-block coefficients are returned on rd_c1/rd_d1 for the SMA's tap ranking.
//
// Formats: ar, ai signed BX bits; rr, ri, ur, ui, er, ei signed with BW
// fractional bits (value int/2^BW); rr, ri, ur, ui have B_ADD+2 bits.
// Timing: one symbol per clock with en=1; u, decisions and errors follow the
// inputs in the same cycle (the architecture is not pipelined); coefficients
// change at the clock edge of an enabled cycle.
module next_canceller #(
  parameter int unsigned N          = 30,
  parameter int unsigned BW         = 12,
  parameter int unsigned BX         = 4,
  parameter int unsigned B_ADD      = 16,
  parameter int unsigned BW_RED_MAX = 2,
  parameter int unsigned G          = 8,
  parameter int unsigned MU_SH      = 5,
  localparam int unsigned ACC_W = B_ADD + 2,
  localparam int unsigned EW    = BW + 2,
  localparam int unsigned PRW   = $clog2(BW_RED_MAX + 1),
  localparam int unsigned IDXW  = $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [BX-1:0]     ar,
  input  logic signed [BX-1:0]     ai,
  input  logic signed [ACC_W-1:0]  rr,
  input  logic signed [ACC_W-1:0]  ri,
  input  logic        [N-1:0]      alpha,
  input  logic        [N-1:0]      beta,
  input  logic        [PRW-1:0]    prec_red,
  input  logic        [IDXW-1:0]   rd_idx,
  output logic signed [ACC_W-1:0]  ur,
  output logic signed [ACC_W-1:0]  ui,
  output logic signed [3:0]        dec_r,
  output logic signed [3:0]        dec_i,
  output logic signed [EW-1:0]     er,
  output logic signed [EW-1:0]     ei,
  output logic signed [BW-1:0]     rd_c1,
  output logic signed [BW-1:0]     rd_d1
);

  logic signed [N-1:0][BW-1:0] c1, d1;
  logic signed [N-1:0][BX-1:0] xr_tap, xi_tap;
  logic signed [N-1:0][BX:0]   xd_tap;
  logic signed [ACC_W-1:0]     yr2, yi2;
  logic        [BW-1:0]        lsb_mask;

  sr_fblock #(.N(N), .BW(BW), .BX(BX), .B_ADD(B_ADD), .BW_RED_MAX(BW_RED_MAX)) u_f (
    .clk, .rst_n, .en, .xr(ar), .xi(ai), .c1, .d1, .alpha, .prec_red,
    .xr_tap, .xi_tap, .xd_tap, .yr2, .yi2
  );

  sr_wud #(.N(N), .BW(BW), .BX(BX), .EW(EW), .G(G), .MU_SH(MU_SH)) u_wud (
    .clk, .rst_n, .en, .beta, .xr_tap, .xi_tap, .xd_tap, .er, .ei, .c1, .d1
  );

  // yr2/yi2 carry BW fractional bits, the same scale as rr/ri.
  assign ur = rr - yr2;
  assign ui = ri - yi2;

  cap_slicer #(.ACC_W(ACC_W), .FRAC(BW), .EW(EW)) u_sl_r (.u(ur), .dec(dec_r), .e(er));
  cap_slicer #(.ACC_W(ACC_W), .FRAC(BW), .EW(EW)) u_sl_i (.u(ui), .dec(dec_i), .e(ei));

  // Coefficients as the F-block multipliers see them (precision applied).
  assign lsb_mask = ~((BW'(1) << prec_red) - BW'(1));
  assign rd_c1 = c1[rd_idx] & lsb_mask;
  assign rd_d1 = d1[rd_idx] & lsb_mask;

endmodule
