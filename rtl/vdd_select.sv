// vdd_select: supply-voltage control word B_V for the number of powered-up
// F-block taps.
//
// After convergence the F-block critical path is
//   Tcp = Tm + N*Tmux + B_ADD*Tcarry + n_on*Tsum,
// so the normalized processing rate r = Tcp/Ts falls as taps are switched
// off, and the supply may drop to Vdd(r) = Vt + r*Vo/2 + sqrt(r^2*Vo^2/4 +
// r*Vt*Vo), Vo = (Vdd,max - Vt)^2/Vdd,max. The block holds one entry per
// possible n_on (0..N): the index of the lowest supply level
// VDD_MIN_MV + j*VDD_STEP_MV that is at least Vdd(r). The table is built at
// elaboration with integer arithmetic only (dat_pkg::vdd_level), so it is a
// small ROM in hardware. Delays and Vdd,max are the document's; the
// threshold voltage, the lowest level and the level spacing are assumed.
//
// Combinational.
module vdd_select #(
  parameter int unsigned N           = 30,
  parameter int unsigned B_ADD       = 16,
  parameter int unsigned T_M_PS      = dat_pkg::T_M_PS,
  parameter int unsigned T_MUX_PS    = dat_pkg::T_MUX_PS,
  parameter int unsigned T_SUM_PS    = dat_pkg::T_SUM_PS,
  parameter int unsigned T_CARRY_PS  = dat_pkg::T_CARRY_PS,
  parameter int unsigned T_S_PS      = dat_pkg::T_S_PS,
  parameter int unsigned VDD_MAX_MV  = dat_pkg::VDD_MAX_MV,
  parameter int unsigned VT_MV       = dat_pkg::VT_MV,
  parameter int unsigned VDD_MIN_MV  = dat_pkg::VDD_MIN_MV,
  parameter int unsigned VDD_STEP_MV = dat_pkg::VDD_STEP_MV,
  localparam int unsigned N_LEVELS = (VDD_MAX_MV - VDD_MIN_MV) / VDD_STEP_MV + 1,
  localparam int unsigned BVW = $clog2(N_LEVELS),
  localparam int unsigned CW  = $clog2(N + 1)
) (
  input  logic [CW-1:0]  n_on,
  output logic [BVW-1:0] bv
);

  logic [BVW-1:0] table_q [N+1];

  for (genvar n = 0; n <= N; n++) begin : g_table
    localparam logic [BVW-1:0] LEVEL =
        BVW'(dat_pkg::vdd_level(n, N, B_ADD, T_M_PS, T_MUX_PS, T_SUM_PS, T_CARRY_PS,
                                T_S_PS, VDD_MAX_MV, VT_MV, VDD_MIN_MV, VDD_STEP_MV,
                                N_LEVELS));
    assign table_q[n] = LEVEL;
  end

  assign bv = (int'(n_on) > int'(N)) ? BVW'(N_LEVELS - 1) : table_q[n_on];

endmodule
