// mult_energy_model: real-time estimate of the energy an array multiplier
// spends when one of its inputs is the constant coefficient w.
//
// Two activity estimates are combined:
//   N1 = number of ones in w (rows with a 0 coefficient bit are quiet),
//   N2 = BW - (number of zero bits below the lowest 1), since the rows of
//        trailing LSB zeros see almost no activity.
// N(w) = 0.9*N1 + 0.1*N2 and E_m(w) = E_max * N(w) / BW. To stay in integers
// the block outputs n10 = 10*N(w) = 9*N1 + N2; comparisons between taps of
// the same precision need nothing else. This follows the adder trees and
// AND chain of the published hardware (ones count, trailing-zero count,
// BW minus that count, weighted sum); the x10 scaling is this design's.
//
// Interface: w is a BW-bit two's complement coefficient, w[BW-1] the sign
// bit. Purely combinational.
module mult_energy_model #(
  parameter int unsigned BW = 12,
  localparam int unsigned NW = $clog2(10 * BW + 1)
) (
  input  logic [BW-1:0] w,
  output logic [NW-1:0] n1,    // number of ones
  output logic [NW-1:0] n2,    // BW minus trailing zeros
  output logic [NW-1:0] n10    // 10 * N(w)
);

  logic [NW-1:0] tz;

  always_comb begin
    logic all_zero;
    n1 = '0;
    tz = '0;
    all_zero = 1'b1;
    // AND chain from the LSB upwards: bit j counts when w[j:0] are all zero.
    for (int j = 0; j < BW; j++) begin
      n1 = n1 + NW'(w[j]);
      all_zero = all_zero & ~w[j];
      tz = tz + NW'(all_zero);
    end
    n2  = NW'(BW) - tz;
    n10 = NW'(9) * n1 + n2;
  end

endmodule
