// sr_wud: strength-reduced weight-update (WUD) block of the complex LMS
// NEXT canceller.
//
// With y = sum conj(w_k) x(n-k), e = er + j*ei and w_k = c_k + j*d_k, the
// complex LMS update w_k += mu * x(n-k) * conj(e) is rewritten for the stored
// pair c1 = c + d, d1 = c - d with three real products per tap:
//   S_k   = (xr - xi)(n-k) * (er - ei)          (WUDRI, shared)
//   c1_k += mu * (S_k + 2*xi(n-k)*er)           (WUDR)
//   d1_k += mu * (S_k + 2*xr(n-k)*ei)           (WUDI)
// which is the published SR weight-update structure.
//
// beta[k]=0 forces zero into the update multipliers of tap k, so its
// coefficient holds; this is how the weight update is powered down.
//
// Number formats: each coefficient register has CW = BW + G bits; the F-block
// uses the top BW bits (value int/2^(BW-1)). The error has value int/2^BW.
// The integer update is (S + 2*x*e) >>> MU_SH, i.e. a power-of-two step size
// mu = 2^-(G + MU_SH - 1). G and MU_SH are this design's choice; the document
// only asks for mu to be a power of two.
//
// Timing: the update of sample n (inputs valid in the cycle with en=1) is
// written at that clock edge; c1/d1 show it from the next cycle. Reset clears
// all coefficients.
module sr_wud #(
  parameter int unsigned N     = 30,
  parameter int unsigned BW    = 12,
  parameter int unsigned BX    = 4,
  parameter int unsigned EW    = BW + 2,
  parameter int unsigned G     = 8,
  parameter int unsigned MU_SH = 5,
  localparam int unsigned CW   = BW + G
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic        [N-1:0]         beta,
  input  logic signed [N-1:0][BX-1:0] xr_tap,
  input  logic signed [N-1:0][BX-1:0] xi_tap,
  input  logic signed [N-1:0][BX:0]   xd_tap,
  input  logic signed [EW-1:0]        er,
  input  logic signed [EW-1:0]        ei,
  output logic signed [N-1:0][BW-1:0] c1,
  output logic signed [N-1:0][BW-1:0] d1
);

  localparam int unsigned PW = BX + EW + 3;

  logic signed [CW-1:0] c1_q [N];
  logic signed [CW-1:0] d1_q [N];
  logic signed [EW:0]   ed;
  logic signed [CW-1:0] dc1 [N];     // per-tap increments
  logic signed [CW-1:0] dd1 [N];

  assign ed = (EW+1)'(er) - (EW+1)'(ei);

  always_comb begin
    for (int k = 0; k < N; k++) begin
      c1[k] = c1_q[k][CW-1:G];
      d1[k] = d1_q[k][CW-1:G];
    end
  end

  // beta mux: a powered-down update multiplies by zero.
  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic signed [PW-1:0] s, ur, ui;
      s  = PW'($signed(xd_tap[k]) * ed);
      ur = s + PW'(2 * $signed(xi_tap[k]) * er);
      ui = s + PW'(2 * $signed(xr_tap[k]) * ei);
      dc1[k] = beta[k] ? CW'(ur >>> MU_SH) : '0;
      dd1[k] = beta[k] ? CW'(ui >>> MU_SH) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        c1_q[k] <= '0;
        d1_q[k] <= '0;
      end
    end else if (en) begin
      for (int k = 0; k < N; k++) begin
        c1_q[k] <= c1_q[k] + dc1[k];
        d1_q[k] <= d1_q[k] + dd1[k];
      end
    end
  end

endmodule
