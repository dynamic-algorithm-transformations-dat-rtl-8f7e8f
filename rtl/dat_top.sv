// dat_top: DAT-based low-power reconfigurable adaptive filtering.
//
// Main design: the near-end crosstalk (NEXT) canceller of a 155.52 Mb/s
// 64-CAP ATM-LAN receiver built as a signal processing block (SPA,
// next_canceller: strength-reduced complex LMS filter with per-tap power
// down and coefficient precision control) under a signal monitoring block
// (SMA, sma) that keeps the slicer SNR in a 31..34 dB window with as few
// powered-up taps, as few coefficient bits and as low a supply as possible.
// The supply itself is external: the SMA's voltage code bv is an output for
// a variable power supply.
//
// Beside it, with its own ports, stands a second DAT system: the real-valued
// reconfigurable LMS filter the complex one is derived from
// (rcfg_lms_filter), sized as in the system-identification example (8 taps,
// 8-bit data and coefficients, 16-bit adders, 20 ns sample period, 5 V
// maximum supply), under its own controller (a second sma instance) that
// keeps the mean squared error below J_o = 0.01 with as few taps, as few
// coefficient bits and as low a supply as it can. Its data precision is
// chosen by data_precision_select from the peak-to-average ratio of its
// input. Its configuration and events are outputs (si_*).
//
// NEXT canceller interface: one symbol per clock with sym_en=1. tx_ar/tx_ai
// are the local transmitter's 64-CAP symbols, rx_r/rx_i the received sample
// after the receive equalizer (BW fractional bits). The cancelled sample,
// the slicer decisions and the slicer error appear in the same cycle.
module dat_top #(
  parameter int unsigned N          = dat_pkg::N_TAPS,
  parameter int unsigned BW         = dat_pkg::BW_MAX,
  parameter int unsigned BX         = dat_pkg::BX_DATA,
  parameter int unsigned B_ADD      = dat_pkg::B_ADD,
  parameter int unsigned BW_RED_MAX = dat_pkg::BW_RED_MAX,
  parameter int unsigned G          = 8,
  parameter int unsigned MU_SH      = 5,
  parameter int unsigned L_WIN      = dat_pkg::L_WIN,
  parameter int unsigned RECONF_L   = dat_pkg::RECONF_L,
  parameter int unsigned CONV_DEC   = 4,
  parameter int unsigned SI_N       = 8,
  parameter int unsigned SI_BW      = 8,
  parameter int unsigned SI_BX      = 8,
  parameter int unsigned SI_B_ADD   = 16,
  parameter int unsigned SI_MU_SH   = 12,
  parameter real         SI_J_O     = 0.01,
  parameter int unsigned SI_T_S_PS  = 20000,
  parameter int unsigned SI_VDD_MAX_MV = 5000,
  localparam int unsigned ACC_W = B_ADD + 2,
  localparam int unsigned EW    = BW + 2,
  localparam int unsigned CNTW  = $clog2(N + 1),
  localparam int unsigned PRW   = $clog2(BW_RED_MAX + 1),
  localparam int unsigned BVW   = $clog2((dat_pkg::VDD_MAX_MV - dat_pkg::VDD_MIN_MV)
                                         / dat_pkg::VDD_STEP_MV + 1),
  localparam int unsigned SW    = 2 * EW + $clog2(L_WIN) + 1,
  localparam int unsigned SI_CNTW = $clog2(SI_N + 1),
  localparam int unsigned SI_BVW  = $clog2((SI_VDD_MAX_MV - dat_pkg::VDD_MIN_MV)
                                           / dat_pkg::VDD_STEP_MV + 1),
  localparam int unsigned SI_SW   = 2 * SI_B_ADD + $clog2(L_WIN) + 1,
  localparam int unsigned SI_XW   = 2 * SI_BX + $clog2(L_WIN)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ---- DAT-based NEXT canceller ----
  input  logic                     sym_en,
  input  logic signed [BX-1:0]     tx_ar,
  input  logic signed [BX-1:0]     tx_ai,
  input  logic signed [ACC_W-1:0]  rx_r,
  input  logic signed [ACC_W-1:0]  rx_i,
  output logic signed [ACC_W-1:0]  u_r,
  output logic signed [ACC_W-1:0]  u_i,
  output logic signed [3:0]        dec_r,
  output logic signed [3:0]        dec_i,
  output logic signed [EW-1:0]     err_r,
  output logic signed [EW-1:0]     err_i,
  output logic [N-1:0]             alpha,
  output logic [N-1:0]             beta,
  output logic [PRW-1:0]           prec_red,
  output logic [BVW-1:0]           bv,
  output logic [CNTW-1:0]          n_on,
  output dat_pkg::sma_state_e      sma_state,
  output logic [SW-1:0]            mse_sum,
  output logic                     ev_decide,
  output logic                     ev_power_down,
  output logic                     ev_undo,
  output logic                     ev_readapt,
  output logic                     ev_converged,
  // ---- DAT-based real LMS filter (system identification) ----
  input  logic                              si_en,
  input  logic signed [SI_BX-1:0]           si_x,
  input  logic signed [SI_B_ADD-1:0]        si_d,
  output logic signed [SI_B_ADD-1:0]        si_y,
  output logic signed [SI_B_ADD-1:0]        si_e,
  output logic signed [SI_N-1:0][SI_BW-1:0] si_w,
  output logic [SI_N-1:0]                   si_alpha,
  output logic [SI_N-1:0]                   si_beta,
  output logic [1:0]                        si_bw_red,
  output logic [1:0]                        si_bx_red,
  output logic [SI_BVW-1:0]                 si_bv,
  output logic [SI_CNTW-1:0]                si_n_on,
  output dat_pkg::sma_state_e               si_state,
  output logic                              si_ev_power_down,
  output logic                              si_ev_undo,
  output logic                              si_ev_readapt,
  output logic                              si_ev_converged,
  output logic                              si_ev_decide,
  output logic [SI_SW-1:0]                  si_mse_sum,
  output logic                              si_bx_done,
  output logic [SI_XW-1:0]                  si_x_pow
);

  localparam int unsigned IDXW = $clog2(N);

  logic [IDXW-1:0]       rd_idx;
  logic signed [BW-1:0]  rd_c1, rd_d1;

  next_canceller #(.N(N), .BW(BW), .BX(BX), .B_ADD(B_ADD), .BW_RED_MAX(BW_RED_MAX),
                   .G(G), .MU_SH(MU_SH)) u_spa (
    .clk, .rst_n, .en(sym_en), .ar(tx_ar), .ai(tx_ai), .rr(rx_r), .ri(rx_i),
    .alpha, .beta, .prec_red, .rd_idx, .ur(u_r), .ui(u_i), .dec_r, .dec_i,
    .er(err_r), .ei(err_i), .rd_c1, .rd_d1
  );

  sma #(.N(N), .BW(BW), .B_ADD(B_ADD), .BW_RED_MAX(BW_RED_MAX), .EW(EW), .L_WIN(L_WIN),
        .RECONF_L(RECONF_L), .CONV_DEC(CONV_DEC)) u_sma (
    .clk, .rst_n, .en(sym_en), .er(err_r), .ei(err_i), .rd_idx, .rd_c1, .rd_d1,
    .alpha, .beta, .prec_red, .bv, .n_on, .state(sma_state), .mse_sum,
    .ev_decide, .ev_power_down, .ev_undo, .ev_readapt, .ev_converged
  );

  // ---- real filter with its own controller ----
  // MSE limit J_o as an SNR-style limit against a unit reference power; the
  // controller trims taps while the MSE is below J_o and undoes the step
  // that takes it above.
  localparam real SI_LIM_DB = 10.0 * $log10(1.0 / SI_J_O);
  localparam int unsigned SI_IDXW = $clog2(SI_N);
  localparam int unsigned SI_FRAC = SI_BW + SI_BX - 2;   // fractional bits of e

  logic [SI_IDXW-1:0]      si_rd_idx;
  logic signed [SI_BW-1:0] si_rd_w;
  logic [SI_BW-1:0]        si_wmask;

  // the coefficient as the filter multiplies it (precision applied)
  assign si_wmask = ~((SI_BW'(1) << si_bw_red) - SI_BW'(1));
  assign si_rd_w  = si_w[si_rd_idx] & si_wmask;

  sma #(.N(SI_N), .BW(SI_BW), .B_ADD(SI_B_ADD), .BW_RED_MAX(2), .EW(SI_B_ADD),
        .L_WIN(L_WIN), .RECONF_L(RECONF_L), .CONV_DEC(CONV_DEC),
        .SNR_LO_DB(SI_LIM_DB), .SNR_HI_DB(SI_LIM_DB), .FRAC(SI_FRAC), .SIG_POW(1.0),
        .T_S_PS(SI_T_S_PS), .VDD_MAX_MV(SI_VDD_MAX_MV)) u_si_sma (
    .clk, .rst_n, .en(si_en), .er(si_e), .ei('0), .rd_idx(si_rd_idx),
    .rd_c1(si_rd_w), .rd_d1(si_rd_w), .alpha(si_alpha), .beta(si_beta),
    .prec_red(si_bw_red), .bv(si_bv), .n_on(si_n_on), .state(si_state),
    .mse_sum(si_mse_sum), .ev_decide(si_ev_decide), .ev_power_down(si_ev_power_down),
    .ev_undo(si_ev_undo), .ev_readapt(si_ev_readapt), .ev_converged(si_ev_converged)
  );

  // data-precision selector of the real filter
  data_precision_select #(.BX(SI_BX), .BX_RED_MAX(2), .L_WIN(L_WIN)) u_si_bx (
    .clk, .rst_n, .en(si_en), .x(si_x), .done(si_bx_done), .bx_red(si_bx_red), .sum(si_x_pow)
  );

  rcfg_lms_filter #(.N(SI_N), .BW(SI_BW), .BX(SI_BX), .B_ADD(SI_B_ADD), .BW_RED_MAX(2),
                    .BX_RED_MAX(2), .MU_SH(SI_MU_SH)) u_si (
    .clk, .rst_n, .en(si_en), .x(si_x), .d(si_d), .alpha(si_alpha), .beta(si_beta),
    .bw_red(si_bw_red), .bx_red(si_bx_red), .y(si_y), .e(si_e), .w(si_w)
  );

endmodule
