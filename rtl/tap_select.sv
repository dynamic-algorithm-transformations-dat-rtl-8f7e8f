// tap_select: finds the powered-up tap that should be switched off next.
//
// The energy-optimum rule is to power down taps in increasing order of the
// energy-normalized metric E_k = |w_k|^2 / E_m(w_k). For the strength-
// reduced complex filter, with c1 = c + d and d1 = c - d,
//   |w_k|^2  = (c1^2 + d1^2) / 2
//   E_m(w_k) ~ N(c+d) + N(d) + N(c-d)      (three F-block multipliers)
// where N() is the multiplier activity model (mult_energy_model). The common
// factors cancel in comparisons, so the block ranks taps by
// mag = c1^2 + d1^2 against e10 = 10*(N(c1) + N(d) + N(d1)), comparing
// E_a < E_b as mag_a*e10_b < mag_b*e10_a (no divider). A tap whose
// coefficients are all zero costs nothing and contributes nothing; it is
// ranked lowest. Ties keep the lower index.
//
// The search is sequential, one tap per clock: the SMA runs rarely, so a
// single energy-model unit and one coefficient read port (rd_idx ->
// rd_c1/rd_d1, answered combinationally by the SPA) suffice. This
// sequencing is this design's choice.
//
// Timing: start (one cycle, while idle) begins a scan of N cycles; done
// pulses one cycle after the last tap, with found=1 and sel_idx valid if any
// tap has alpha=1.
module tap_select #(
  parameter int unsigned N  = 30,
  parameter int unsigned BW = 12,
  localparam int unsigned IDXW = $clog2(N),
  localparam int unsigned NW   = $clog2(10 * BW + 1),
  localparam int unsigned EWD  = NW + 2,
  localparam int unsigned MW   = 2 * BW + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N-1:0]           alpha,
  output logic [IDXW-1:0]        rd_idx,
  input  logic signed [BW-1:0]   rd_c1,
  input  logic signed [BW-1:0]   rd_d1,
  output logic                   busy,
  output logic                   done,
  output logic                   found,
  output logic [IDXW-1:0]        sel_idx
);

  logic signed [BW:0]   diff;
  logic signed [BW-1:0] dd;          // d = (c1 - d1) / 2
  logic [NW-1:0]        n10_c1, n10_d, n10_d1;
  logic [NW-1:0]        unused_a [3];
  logic [NW-1:0]        unused_b [3];
  logic [EWD-1:0]       e10, best_e10;
  logic [MW-1:0]        mag, best_mag;
  logic                 better;

  assign diff = (BW+1)'(rd_c1) - (BW+1)'(rd_d1);
  assign dd   = BW'(diff >>> 1);

  mult_energy_model #(.BW(BW)) u_em_c1 (.w(rd_c1), .n1(unused_a[0]), .n2(unused_b[0]), .n10(n10_c1));
  mult_energy_model #(.BW(BW)) u_em_d  (.w(dd),    .n1(unused_a[1]), .n2(unused_b[1]), .n10(n10_d));
  mult_energy_model #(.BW(BW)) u_em_d1 (.w(rd_d1), .n1(unused_a[2]), .n2(unused_b[2]), .n10(n10_d1));

  assign e10 = EWD'(n10_c1) + EWD'(n10_d) + EWD'(n10_d1);
  assign mag = MW'(rd_c1 * rd_c1) + MW'(rd_d1 * rd_d1);

  always_comb begin
    logic [MW+EWD-1:0] lhs, rhs;
    lhs = (MW+EWD)'(mag) * (MW+EWD)'(best_e10);
    rhs = (MW+EWD)'(best_mag) * (MW+EWD)'(e10);
    if (!found)               better = 1'b1;
    else if (best_e10 == '0)  better = 1'b0;            // best already E=0
    else if (e10 == '0)       better = (best_mag != '0);
    else                      better = lhs < rhs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      found    <= 1'b0;
      sel_idx  <= '0;
      rd_idx   <= '0;
      best_e10 <= '0;
      best_mag <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          found  <= 1'b0;
          rd_idx <= '0;
        end
      end else begin
        if (alpha[rd_idx] && better) begin
          found    <= 1'b1;
          sel_idx  <= rd_idx;
          best_e10 <= e10;
          best_mag <= mag;
        end
        if (rd_idx == IDXW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          rd_idx <= rd_idx + 1'b1;
        end
      end
    end
  end

endmodule
