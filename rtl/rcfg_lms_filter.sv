// rcfg_lms_filter: reconfigurable real LMS adaptive filter (direct form).
//
// y(n)   = sum_k alpha_k * w_k(n-1) * x(n-k)        (F-block)
// e(n)   = d(n) - y(n)
// w_k(n) = w_k(n-1) + beta_k * mu * e(n) * x(n-k)   (WUD-block)
// Each tap carries two multiplexers as in the published reconfigurable tap:
// alpha_k = 0 forces zero into the F-block multiplier and bypasses its
// adder; beta_k = 0 forces zero into the WUD multiplier so w_k holds. In
// addition bw_red forces that many LSBs of every coefficient to zero at the
// F-block multiplier (coefficient precision B_w) and bx_red forces that many
// LSBs of the input to zero (data precision B_x). Defaults follow the
// document's system-identification example: 8 taps, 8-bit data and
// coefficients, 16-bit F-block adders.
//
// Formats: x signed BX bits, value int/2^(BX-1); coefficients signed BW bits,
// value int/2^(BW-1), kept in BW+G-bit registers; d, y, e signed B_ADD bits,
// value int/2^(BW+BX-2). The update adds (e*x) >>> MU_SH to the register,
// i.e. mu = 2^(2*BX-2-G-MU_SH), a power of two as the document assumes; G
// and MU_SH are this design's choice. The F and WUD blocks share one data
// delay line (the published architecture draws one per block; the values are the
// same). e is computed one bit wider and saturated to B_ADD bits.
//
// Timing: not pipelined; y and e follow x and d in the same cycle, the
// weights and the delay line update at the clock edge when en=1.
module rcfg_lms_filter #(
  parameter int unsigned N          = 8,
  parameter int unsigned BW         = 8,
  parameter int unsigned BX         = 8,
  parameter int unsigned B_ADD      = 16,
  parameter int unsigned BW_RED_MAX = 2,
  parameter int unsigned BX_RED_MAX = 2,
  parameter int unsigned G          = 8,
  parameter int unsigned MU_SH      = 12,
  localparam int unsigned PRW = $clog2(BW_RED_MAX + 1),
  localparam int unsigned PXW = $clog2(BX_RED_MAX + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic signed [BX-1:0]        x,
  input  logic signed [B_ADD-1:0]     d,
  input  logic        [N-1:0]         alpha,
  input  logic        [N-1:0]         beta,
  input  logic        [PRW-1:0]       bw_red,
  input  logic        [PXW-1:0]       bx_red,
  output logic signed [B_ADD-1:0]     y,
  output logic signed [B_ADD-1:0]     e,
  output logic signed [N-1:0][BW-1:0] w
);

  localparam int unsigned CW = BW + G;
  localparam int unsigned PW = B_ADD + BX;

  logic signed [N-1:0][BX-1:0] xt;      // x(n-k), tap 0 = current input
  logic signed [N-1:1][BX-1:0] x_q;
  logic signed [CW-1:0]        w_q [N];
  logic        [BW-1:0]        wmask;
  logic        [BX-1:0]        xmask;
  logic signed [B_ADD:0]       e_full;
  logic signed [CW-1:0]        dw [N];   // per-tap increments

  assign wmask = ~((BW'(1) << bw_red) - BW'(1));
  assign xmask = ~((BX'(1) << bx_red) - BX'(1));

  always_comb begin
    xt[0] = x & xmask;
    for (int k = 1; k < N; k++) xt[k] = x_q[k];
    for (int k = 0; k < N; k++) w[k] = w_q[k][CW-1:G];
  end

  always_comb begin
    logic signed [BW-1:0]    wk;
    logic signed [BW+BX-1:0] p;
    y = '0;
    for (int k = 0; k < N; k++) begin
      wk = alpha[k] ? (w[k] & wmask) : '0;
      p  = wk * $signed(xt[k]);
      y  = y + B_ADD'(p);
    end
    e_full = (B_ADD+1)'(d) - (B_ADD+1)'(y);
    if (e_full > (B_ADD+1)'((1 << (B_ADD-1)) - 1))  e = {1'b0, {(B_ADD-1){1'b1}}};
    else if (e_full < -(B_ADD+1)'(1 << (B_ADD-1))) e = {1'b1, {(B_ADD-1){1'b0}}};
    else                                           e = B_ADD'(e_full);
  end

  // beta mux: a powered-down update multiplies by zero.
  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic signed [PW-1:0] upd;
      upd   = e * $signed(xt[k]);
      dw[k] = beta[k] ? CW'(upd >>> MU_SH) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      for (int k = 0; k < N; k++) w_q[k] <= '0;
    end else if (en) begin
      for (int k = 1; k < N; k++) x_q[k] <= xt[k-1];
      for (int k = 0; k < N; k++) w_q[k] <= w_q[k] + dw[k];
    end
  end

endmodule
