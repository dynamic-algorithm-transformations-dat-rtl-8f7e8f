// sma: signal monitoring algorithm (SMA) of the DAT-based NEXT canceller.
//
// The SMA watches the slicer SNR of the SPA and picks the configuration of
// least energy that keeps SNR_sl inside the target window [31 dB, 34 dB]:
//   * state detector (mse_monitor): SNR over windows of L_WIN symbols;
//   * select taps (tap_select): powers down taps one at a time, smallest
//     energy-normalized metric E_k first, until the SNR constraint breaks;
//   * select precision (precision_select) and select Vdd (vdd_select):
//     follow from the number of powered-up taps.
// The SMA decides once every RECONF_L symbols (DEC_WINS = RECONF_L/L_WIN
// windows), using the last complete window.
//
// Controller (states from dat_pkg::sma_state_e):
//   ADAPT   all taps on and updating. After CONV_DEC decisions the filter is
//           taken as converged unless the SNR is still below the window;
//           then every beta is cleared (weight update off) and, if the SNR
//           is above the window, a tap search starts.
//   SCAN    tap_select runs; the chosen tap's alpha is cleared -> VERIFY.
//   VERIFY  at the next decision: SNR below the window -> the last tap is
//           powered up again and the tap count is frozen (MONITOR); SNR
//           still above the window -> another SCAN; otherwise MONITOR.
//   MONITOR SNR below the window means the input state changed: all taps
//           are powered up, weight update on, back to ADAPT. SNR above the
//           window (and no frozen count) -> SCAN.
// Every change of configuration restarts the SNR window and the decision
// period so that each decision sees only the new configuration.
//
// The window limits, the 1024-symbol window, the 8192-symbol
// reconfiguration interval, the order in which taps go down and the
// "all taps on when the state changes" rule follow the document; the
// convergence count CONV_DEC, the freeze after an undo (to stop
// oscillation) and the one-tap-per-decision pace are this design's choices.
// The data precision is not reconfigured: the NEXT canceller's input is a
// fixed 4-bit 64-CAP symbol.
//
// The same controller serves a real filter: SIG_POW and SNR_LO_DB then
// express its MSE limit (SNR_LO_DB = 10*log10(SIG_POW/J_o)), FRAC is the
// error's number of fractional bits, and T_S_PS/VDD_MAX_MV its sample
// period and maximum supply; the real filter returns the same coefficient
// on rd_c1 and rd_d1, which ranks its taps by w^2/E_m(w).
//
// Outputs alpha, beta are registered; prec_red and bv are combinational
// functions of the number of powered-up taps. ev_* pulse for one cycle on
// the corresponding event.
module sma #(
  parameter int unsigned N          = 30,
  parameter int unsigned BW         = 12,
  parameter int unsigned B_ADD      = 16,
  parameter int unsigned BW_RED_MAX = 2,
  parameter int unsigned EW         = BW + 2,
  parameter int unsigned L_WIN      = 1024,
  parameter int unsigned RECONF_L   = 8192,
  parameter int unsigned CONV_DEC   = 4,
  parameter real         SNR_LO_DB  = 31.0,
  parameter real         SNR_HI_DB  = 34.0,
  parameter int unsigned FRAC       = BW,
  parameter real         SIG_POW    = 42.0,
  parameter int unsigned T_S_PS     = dat_pkg::T_S_PS,
  parameter int unsigned VDD_MAX_MV = dat_pkg::VDD_MAX_MV,
  localparam int unsigned IDXW = $clog2(N),
  localparam int unsigned CNTW = $clog2(N + 1),
  localparam int unsigned PRW  = $clog2(BW_RED_MAX + 1),
  localparam int unsigned BVW  = $clog2((VDD_MAX_MV - dat_pkg::VDD_MIN_MV)
                                        / dat_pkg::VDD_STEP_MV + 1),
  localparam int unsigned SW   = 2 * EW + $clog2(L_WIN) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [EW-1:0]  er,
  input  logic signed [EW-1:0]  ei,
  output logic [IDXW-1:0]       rd_idx,
  input  logic signed [BW-1:0]  rd_c1,
  input  logic signed [BW-1:0]  rd_d1,
  output logic [N-1:0]          alpha,
  output logic [N-1:0]          beta,
  output logic [PRW-1:0]        prec_red,
  output logic [BVW-1:0]        bv,
  output logic [CNTW-1:0]       n_on,
  output dat_pkg::sma_state_e   state,
  output logic [SW-1:0]         mse_sum,
  output logic                  ev_decide,
  output logic                  ev_power_down,
  output logic                  ev_undo,
  output logic                  ev_readapt,
  output logic                  ev_converged
);
  import dat_pkg::*;

  localparam int unsigned DEC_WINS = (RECONF_L / L_WIN) < 1 ? 1 : RECONF_L / L_WIN;
  localparam int unsigned DWW      = $clog2(DEC_WINS + 1);
  localparam int unsigned CDW      = $clog2(CONV_DEC + 1);

  logic            win_done, snr_low, snr_high, restart;
  logic [DWW-1:0]  win_cnt;
  logic            decide;
  logic [CDW-1:0]  conv_cnt;
  logic            frozen;
  logic [IDXW-1:0] last_off;
  logic            scan_start, scan_busy, scan_done, scan_found;
  logic [IDXW-1:0] scan_idx;

  mse_monitor #(.EW(EW), .FRAC(FRAC), .L_WIN(L_WIN), .SNR_LO_DB(SNR_LO_DB),
                .SNR_HI_DB(SNR_HI_DB), .SIG_POW(SIG_POW)) u_mon (
    .clk, .rst_n, .en, .clear(restart), .er, .ei, .done(win_done),
    .snr_low, .snr_high, .sum(mse_sum)
  );

  tap_select #(.N(N), .BW(BW)) u_sel (
    .clk, .rst_n, .start(scan_start), .alpha, .rd_idx, .rd_c1, .rd_d1,
    .busy(scan_busy), .done(scan_done), .found(scan_found), .sel_idx(scan_idx)
  );

  always_comb begin
    n_on = '0;
    for (int k = 0; k < N; k++) n_on = n_on + CNTW'(alpha[k]);
  end

  precision_select #(.N(N), .BW_RED_MAX(BW_RED_MAX)) u_prec (.n_on, .prec_red);
  vdd_select #(.N(N), .B_ADD(B_ADD), .T_S_PS(T_S_PS), .VDD_MAX_MV(VDD_MAX_MV)) u_vdd (.n_on, .bv);

  // Decision tick: the DEC_WINS-th completed window since the last restart.
  assign decide = win_done && (win_cnt == DWW'(DEC_WINS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt <= '0;
    end else if (restart || decide) begin
      win_cnt <= '0;
    end else if (win_done) begin
      win_cnt <= win_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= SMA_ADAPT;
      alpha         <= '1;
      beta          <= '1;
      conv_cnt      <= '0;
      frozen        <= 1'b0;
      last_off      <= '0;
      scan_start    <= 1'b0;
      restart       <= 1'b0;
      ev_power_down <= 1'b0;
      ev_undo       <= 1'b0;
      ev_readapt    <= 1'b0;
      ev_converged  <= 1'b0;
    end else begin
      scan_start    <= 1'b0;
      restart       <= 1'b0;
      ev_power_down <= 1'b0;
      ev_undo       <= 1'b0;
      ev_readapt    <= 1'b0;
      ev_converged  <= 1'b0;
      unique case (state)
        SMA_ADAPT: if (decide) begin
          if (conv_cnt < CDW'(CONV_DEC - 1)) begin
            conv_cnt <= conv_cnt + 1'b1;
          end else if (!snr_low) begin
            beta         <= '0;
            ev_converged <= 1'b1;
            if (snr_high && n_on > CNTW'(1)) begin
              scan_start <= 1'b1;
              state      <= SMA_SCAN;
            end else begin
              state <= SMA_MONITOR;
            end
          end
        end
        SMA_SCAN: if (scan_done) begin
          if (scan_found) begin
            alpha[scan_idx] <= 1'b0;
            last_off        <= scan_idx;
            ev_power_down   <= 1'b1;
            state           <= SMA_VERIFY;
          end else begin
            state <= SMA_MONITOR;
          end
          restart <= 1'b1;
        end
        SMA_VERIFY: if (decide) begin
          if (snr_low) begin
            alpha[last_off] <= 1'b1;
            frozen          <= 1'b1;
            ev_undo         <= 1'b1;
            restart         <= 1'b1;
            state           <= SMA_MONITOR;
          end else if (snr_high && n_on > CNTW'(1)) begin
            scan_start <= 1'b1;
            state      <= SMA_SCAN;
          end else begin
            state <= SMA_MONITOR;
          end
        end
        SMA_MONITOR: if (decide) begin
          if (snr_low) begin
            alpha      <= '1;
            beta       <= '1;
            frozen     <= 1'b0;
            conv_cnt   <= '0;
            ev_readapt <= 1'b1;
            restart    <= 1'b1;
            state      <= SMA_ADAPT;
          end else if (snr_high && !frozen && n_on > CNTW'(1)) begin
            scan_start <= 1'b1;
            state      <= SMA_SCAN;
          end
        end
        default: state <= SMA_ADAPT;
      endcase
    end
  end

  assign ev_decide = decide;

  // The tap search is only ever started from an idle selector.
  a_scan_idle: assert property (@(posedge clk) !(scan_start && scan_busy));

endmodule
