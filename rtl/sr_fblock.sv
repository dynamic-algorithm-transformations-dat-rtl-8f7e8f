// sr_fblock: reconfigurable strength-reduced (SR) complex FIR F-block.
//
// Computes y = sum_k conj(w_k) x(n-k) for complex data x = xr + j*xi and
// coefficients w_k = c_k + j*d_k with three real multipliers per tap instead
// of four. The filter holds c1_k = c_k + d_k and d1_k = c_k - d_k:
//   row 1: y1 = sum c1_k * xr(n-k)
//   row 2: y2 = sum d1_k * xi(n-k)
//   row 3: y3 = sum (-d_k) * (xr - xi)(n-k),  -2*d_k = d1_k - c1_k
//   yr = y1 + y3,  yi = y2 + y3.
// Row 3 runs on its own delay line holding xr - xi, as in the published SR
// architecture. Because the row-3 coefficient is -2*d_k, the outputs are
// produced at twice the value (one extra LSB) so nothing is rounded:
//   yr2 = 2*y1 + row3,  yi2 = 2*y2 + row3.
//
// Reconfiguration (per published reconfigurable tap): alpha[k]=0 forces zero
// into the three multipliers of tap k and bypasses its adders; prec_red
// forces the prec_red LSBs of c1_k and d1_k to zero at the multiplier input
// (two AND gates per coefficient, at most BW_RED_MAX bits).
//
// Number formats: x is a signed BX-bit integer; c1,d1 are signed BW-bit with
// value int/2^(BW-1); yr2, yi2 have value int/2^BW. Rows 1 and 2 accumulate
// in B_ADD-bit two's complement adders, row 3 and the outputs in B_ADD+2 bits
// (row 3 carries one extra bit on each multiplier input); the widths beyond
// B_ADD are this design's choice.
//
// Timing: not pipelined. tap 0 is the current input, so yr2/yi2 follow the
// inputs combinationally in the same cycle; the delay lines shift on each
// clock with en=1 (one sample per enabled clock).
module sr_fblock #(
  parameter int unsigned N          = 30,
  parameter int unsigned BW         = 12,
  parameter int unsigned BX         = 4,
  parameter int unsigned B_ADD      = 16,
  parameter int unsigned BW_RED_MAX = 2,
  localparam int unsigned ACC_W = B_ADD + 2,
  localparam int unsigned PRW   = $clog2(BW_RED_MAX + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic signed [BX-1:0]           xr,
  input  logic signed [BX-1:0]           xi,
  input  logic signed [N-1:0][BW-1:0]    c1,
  input  logic signed [N-1:0][BW-1:0]    d1,
  input  logic        [N-1:0]            alpha,
  input  logic        [PRW-1:0]          prec_red,
  output logic signed [N-1:0][BX-1:0]    xr_tap,   // xr(n-k), tap 0 = input
  output logic signed [N-1:0][BX-1:0]    xi_tap,   // xi(n-k)
  output logic signed [N-1:0][BX:0]      xd_tap,   // (xr-xi)(n-k)
  output logic signed [ACC_W-1:0]        yr2,
  output logic signed [ACC_W-1:0]        yi2
);

  logic signed [N-1:1][BX-1:0] xr_q, xi_q;
  logic signed [N-1:1][BX:0]   xd_q;
  logic        [BW-1:0]        lsb_mask;
  logic signed [B_ADD-1:0]     y1, y2;
  logic signed [ACC_W-1:0]     y3;

  always_comb begin
    xr_tap[0] = xr;
    xi_tap[0] = xi;
    xd_tap[0] = (BX+1)'(xr) - (BX+1)'(xi);
    for (int k = 1; k < N; k++) begin
      xr_tap[k] = xr_q[k];
      xi_tap[k] = xi_q[k];
      xd_tap[k] = xd_q[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr_q <= '0;
      xi_q <= '0;
      xd_q <= '0;
    end else if (en) begin
      for (int k = 1; k < N; k++) begin
        xr_q[k] <= xr_tap[k-1];
        xi_q[k] <= xi_tap[k-1];
        xd_q[k] <= xd_tap[k-1];
      end
    end
  end

  assign lsb_mask = ~((BW'(1) << prec_red) - BW'(1));

  always_comb begin
    logic signed [BW-1:0] c1m, d1m;
    logic signed [BW:0]   m3;
    logic signed [BW+BX-1:0] p1, p2;
    logic signed [BW+BX+1:0] p3;
    y1 = '0;
    y2 = '0;
    y3 = '0;
    for (int k = 0; k < N; k++) begin
      // alpha mux: a powered-down tap feeds zero into its multipliers.
      c1m = alpha[k] ? (c1[k] & lsb_mask) : '0;
      d1m = alpha[k] ? (d1[k] & lsb_mask) : '0;
      m3  = (BW+1)'(d1m) - (BW+1)'(c1m);
      p1 = c1m * $signed(xr_tap[k]);
      p2 = d1m * $signed(xi_tap[k]);
      p3 = m3 * $signed(xd_tap[k]);
      y1 = y1 + B_ADD'(p1);
      y2 = y2 + B_ADD'(p2);
      y3 = y3 + ACC_W'(p3);
    end
    yr2 = {y1[B_ADD-1], y1, 1'b0} + y3;
    yi2 = {y2[B_ADD-1], y2, 1'b0} + y3;
  end

endmodule
