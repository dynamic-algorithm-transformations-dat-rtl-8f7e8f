// mse_monitor: the SMA's input-state detector. It measures the slicer SNR
// and reports where it lies against the target window.
//
// SNR_sl(dB) = 10*log10(SIG_POW) - J_sl(dB), with SIG_POW the reference
// signal power (42, the mean 64-CAP constellation power, by default) and J_sl
// the slicer MSE averaged over L_WIN symbols. A plain MSE limit J_o is the
// special case SNR_LO_DB = 10*log10(SIG_POW / J_o). Rather than take
// a logarithm, the block sums |e|^2 = er^2 + ei^2 over L_WIN symbols and
// compares the sum with two constants worked out at elaboration:
//   snr_low  : SNR_sl < SNR_LO_DB  (sum > L_WIN * SIG_POW * 10^(-SNR_LO_DB/10))
//   snr_high : SNR_sl > SNR_HI_DB  (sum < L_WIN * SIG_POW * 10^(-SNR_HI_DB/10))
// (both in units of 2^-2*FRAC). The window, 1024 symbols, and the 31 dB /
// 34 dB limits follow the document; the exact-power-of-two comparison form
// is this design's.
//
// Timing: one error sample per clock with en=1. After the L_WIN-th sample
// of a window, done pulses for one cycle and snr_low, snr_high and sum hold
// the result until the next window ends. Windows follow each other without
// gaps; clear discards the samples of the window in progress and starts a
// new one (the SMA uses it after each reconfiguration). Results are zero
// after reset.
module mse_monitor #(
  parameter int unsigned EW        = 14,
  parameter int unsigned FRAC      = 12,
  parameter int unsigned L_WIN     = 1024,
  parameter real         SNR_LO_DB = 31.0,
  parameter real         SNR_HI_DB = 34.0,
  parameter real         SIG_POW   = 42.0,
  localparam int unsigned SW = 2 * EW + $clog2(L_WIN) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clear,   // restart the current window
  input  logic signed [EW-1:0] er,
  input  logic signed [EW-1:0] ei,
  output logic                 done,
  output logic                 snr_low,
  output logic                 snr_high,
  output logic        [SW-1:0] sum
);

  localparam real SCALE = real'(L_WIN) * SIG_POW * (2.0 ** (2 * FRAC));
  localparam logic [SW-1:0] TH_LO = SW'(longint'(SCALE * (10.0 ** (-SNR_LO_DB / 10.0))));
  localparam logic [SW-1:0] TH_HI = SW'(longint'(SCALE * (10.0 ** (-SNR_HI_DB / 10.0))));
  localparam int unsigned CNTW = $clog2(L_WIN);

  logic [SW-1:0]   acc;
  logic [CNTW-1:0] cnt;
  logic [2*EW-1:0] sq;

  assign sq = (2*EW)'(er * er) + (2*EW)'(ei * ei);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      cnt      <= '0;
      done     <= 1'b0;
      snr_low  <= 1'b0;
      snr_high <= 1'b0;
      sum      <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        cnt <= '0;
        acc <= '0;
      end else if (en) begin
        if (cnt == CNTW'(L_WIN - 1)) begin
          cnt      <= '0;
          acc      <= '0;
          sum      <= acc + SW'(sq);
          snr_low  <= (acc + SW'(sq)) > TH_LO;
          snr_high <= (acc + SW'(sq)) < TH_HI;
          done     <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= acc + SW'(sq);
        end
      end
    end
  end

endmodule
