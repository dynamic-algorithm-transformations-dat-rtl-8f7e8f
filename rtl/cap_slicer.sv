// cap_slicer: one dimension of the 64-CAP slicer and its error.
//
// 64-CAP carries 8 levels per dimension, {-7,-5,-3,-1,1,3,5,7}. The slicer
// picks the nearest level a = clamp(2*floor(u/2)+1, -7, 7) and returns the
// slicer error e = u - a, which is what drives the NEXT canceller's weight
// update and the SNR monitor. The error is saturated to EW bits.
//
// Interface: u is signed ACC_W bits with FRAC fractional bits; the decision
// is a signed 4-bit integer; e has the same scale as u. Combinational.
module cap_slicer #(
  parameter int unsigned ACC_W = 18,
  parameter int unsigned FRAC  = 12,
  parameter int unsigned EW    = 14
) (
  input  logic signed [ACC_W-1:0] u,
  output logic signed [3:0]       dec,
  output logic signed [EW-1:0]    e
);

  localparam int unsigned IW = ACC_W - FRAC;   // integer bits of u
  localparam logic signed [ACC_W:0] E_MAX = (ACC_W+1)'((1 << (EW-1)) - 1);
  localparam logic signed [ACC_W:0] E_MIN = -(ACC_W+1)'(1 << (EW-1));

  logic signed [IW-1:0]  half;     // floor(u/2)
  logic signed [IW:0]    lvl;
  logic signed [ACC_W:0] diff;

  always_comb begin
    half = IW'(u >>> (FRAC + 1));
    lvl  = {half, 1'b1};            // 2*floor(u/2) + 1
    if (lvl > 7)       lvl = 7;
    else if (lvl < -7) lvl = -7;
    dec  = 4'(lvl);
    diff = (ACC_W+1)'(u) - ((ACC_W+1)'(lvl) <<< FRAC);
    if (diff > E_MAX)      e = EW'(E_MAX);
    else if (diff < E_MIN) e = EW'(E_MIN);
    else                   e = EW'(diff);
  end

endmodule
