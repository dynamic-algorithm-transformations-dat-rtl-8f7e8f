// precision_select: optimum coefficient precision for the number of taps
// that are powered up.
//
// Coefficient round-off noise grows with the number of taps as
// N * 2^(-2*Bw), so keeping it fixed allows
//   Bw,opt = Bw + 0.5*log2(n_on / N)   (rounded up to whole bits),
// one bit less for each factor of four fewer taps. The block returns the
// number of LSBs to force to zero, r = floor(0.5*log2(N/n_on)), computed
// without logarithms as the largest r <= BW_RED_MAX with n_on * 4^r <= N.
// n_on = 0 is treated like n_on = 1.
//
// Combinational.
module precision_select #(
  parameter int unsigned N          = 30,
  parameter int unsigned BW_RED_MAX = 2,
  localparam int unsigned CW  = $clog2(N + 1),
  localparam int unsigned PRW = $clog2(BW_RED_MAX + 1)
) (
  input  logic [CW-1:0]  n_on,
  output logic [PRW-1:0] prec_red
);

  always_comb begin
    logic [CW+2*BW_RED_MAX:0] scaled;
    prec_red = '0;
    for (int unsigned r = 1; r <= BW_RED_MAX; r++) begin
      scaled = (CW + 2*BW_RED_MAX + 1)'(n_on == '0 ? CW'(1) : n_on) << (2 * r);
      if (scaled <= (CW + 2*BW_RED_MAX + 1)'(N)) prec_red = PRW'(r);
    end
  end

endmodule
