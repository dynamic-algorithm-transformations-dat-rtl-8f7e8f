// dat_pkg: constants and elaboration-time helpers shared by the DAT
// (dynamic algorithm transformation) NEXT canceller.
//
// Default sizes are those of the 155.52 Mb/s ATM-LAN NEXT canceller: 30 taps,
// 12-bit coefficients, 4-bit data (64-CAP symbols -7..7), 16-bit F-block
// adders. Delay and voltage numbers are the ones used to derive the supply
// voltage; the threshold voltage is not published and is an assumed 0.5 V.
//
// Fixed-point conventions used throughout:
//   * data x: signed integer, BX bits (64-CAP levels -7,-5,...,7).
//   * coefficients: signed, BW bits, value = int / 2^(BW-1).
//   * canceller output, received sample, slicer input and error: signed,
//     value = int / 2^BW (BW fractional bits).
//
// Lint note: when this package is checked on its own, every constant below
// is reported as an unused parameter. That is expected: the constants are
// only read by the modules that import them (dat_top, sma, vdd_select and
// others), not inside the package itself.
package dat_pkg;

  // ---- NEXT canceller (worst-case design) -------------------------------
  parameter int unsigned N_TAPS     = 30;  // taps
  parameter int unsigned BW_MAX     = 12;  // coefficient precision (bits)
  parameter int unsigned BX_DATA    = 4;   // data precision (bits)
  parameter int unsigned B_ADD      = 16;  // F-block adder precision (bits)
  parameter int unsigned BW_RED_MAX = 2;   // max LSBs forced to zero
  parameter int unsigned L_WIN      = 1024; // symbols per MSE window
  parameter int unsigned RECONF_L   = 8192; // symbols between reconfigurations

  // ---- delays (picoseconds) and voltages (millivolts) ---------------------
  parameter int unsigned T_M_PS     = 4000;
  parameter int unsigned T_MUX_PS   = 100;
  parameter int unsigned T_SUM_PS   = 700;
  parameter int unsigned T_CARRY_PS = 600;
  parameter int unsigned T_S_PS     = 38000;
  parameter int unsigned VDD_MAX_MV = 2500;
  parameter int unsigned VT_MV      = 500;   // assumed threshold voltage
  parameter int unsigned VDD_MIN_MV = 1000;  // lowest supply level
  parameter int unsigned VDD_STEP_MV = 100;  // supply level spacing

  // SMA controller states.
  typedef enum logic [1:0] {
    SMA_ADAPT   = 2'd0,   // all taps on, weight update on, converging
    SMA_SCAN    = 2'd1,   // searching for the tap with the smallest E_k
    SMA_VERIFY  = 2'd2,   // a tap was just powered down, checking SNR
    SMA_MONITOR = 2'd3    // steady state, watching the SNR window
  } sma_state_e;

  // Supply level index for a processing rate given by the number of
  // powered-up taps. Level j has voltage VMIN + j*VSTEP. The smallest level
  // whose delay still meets the sample period is returned, i.e. the smallest
  // V with (V-Vt)^2 / V >= r * (Vmax-Vt)^2 / Vmax, r = Tcp/Ts, which is the
  // closed form Vdd(r) of the alpha-power (alpha=2) delay model rounded up.
  function automatic int unsigned vdd_level(
      input int unsigned n_on, input int unsigned n_taps,
      input int unsigned b_add, input int unsigned t_m, input int unsigned t_mux,
      input int unsigned t_sum, input int unsigned t_carry, input int unsigned t_s,
      input int unsigned vmax, input int unsigned vt, input int unsigned vmin,
      input int unsigned vstep, input int unsigned n_levels);
    longint tcp, lhs, rhs, v;
    tcp = longint'(t_m) + longint'(n_taps) * longint'(t_mux) + longint'(b_add) * longint'(t_carry)
        + longint'(n_on) * longint'(t_sum);
    for (int unsigned j = 0; j < n_levels; j++) begin
      v = longint'(vmin) + longint'(j) * longint'(vstep);
      if (v > longint'(vt)) begin
        lhs = (v - longint'(vt)) * (v - longint'(vt)) * longint'(vmax) * longint'(t_s);
        rhs = tcp * (longint'(vmax) - longint'(vt)) * (longint'(vmax) - longint'(vt)) * v;
        if (lhs >= rhs) return j;
      end
    end
    return n_levels - 1;
  endfunction

endpackage
