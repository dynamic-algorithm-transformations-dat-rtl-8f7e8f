// data_precision_select: the data-precision half of the SMA's precision
// selector. It measures the input's peak-to-average ratio and reports how
// many input LSBs the filter may drop.
//
// The input is assumed to be scaled (by an automatic gain control ahead of
// the converter) so that its range matches the full scale
// x_max = 2^(BX-1) of a BX-bit word. The quantization SNR of a B-bit input is
// then about 6*B + 4.8 - PAR(dB), with PAR = 20*log10(x_max / rms(x)). A
// design that must cope with a worst-case ratio PAR_MAX_DB at BX bits keeps
// the same SNR with (PAR_MAX_DB - PAR)/6 fewer bits when the actual ratio is
// lower, so
//   bx_red = min(BX_RED_MAX, floor((PAR_MAX_DB - PAR) / 6)), at least 0.
// The block sums x^2 over L_WIN samples and, instead of taking a logarithm,
// compares the sum with one constant per reduction step r:
//   reduction r allowed  <=>  PAR <= PAR_MAX_DB - 6r
//                        <=>  sum >= L_WIN * x_max^2 * 10^(-(PAR_MAX_DB - 6r)/10)
// The constants are computed at elaboration. The rule and the 6 dB per bit
// follow the document; the window length, the worst-case ratio (14 dB, that of a
// roughly Gaussian signal clipped at five times its rms value at the
// converter) and the maximum reduction are this design's choices.
//
// Timing: one sample per clock with en=1. After the L_WIN-th sample of a
// window, done pulses for one cycle, and bx_red and sum take the new result
// and hold it until the next window ends. Windows follow each other without
// gaps. After reset bx_red is 0 (full precision).
module data_precision_select #(
  parameter int unsigned BX         = 8,
  parameter int unsigned BX_RED_MAX = 2,
  parameter int unsigned L_WIN      = 1024,
  parameter real         PAR_MAX_DB = 14.0,
  localparam int unsigned PXW = $clog2(BX_RED_MAX + 1),
  localparam int unsigned SW  = 2 * BX + $clog2(L_WIN)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [BX-1:0] x,
  output logic                 done,
  output logic       [PXW-1:0] bx_red,
  output logic        [SW-1:0] sum
);

  localparam real FS = real'(L_WIN) * (2.0 ** (2 * (BX - 1)));   // L_WIN * x_max^2
  localparam int unsigned CNTW = $clog2(L_WIN);

  // th[r]: smallest window sum that allows a reduction of r bits. A value
  // above FS can never be reached and is clamped to FS + 1.
  logic [SW-1:0] th [BX_RED_MAX+1];
  for (genvar r = 0; r <= BX_RED_MAX; r++) begin : g_th
    localparam real T = FS * (10.0 ** (-(PAR_MAX_DB - 6.0 * r) / 10.0));
    localparam logic [SW-1:0] TH = (r == 0) ? '0 :
                                   (T > FS) ? SW'(longint'(FS) + 1) :
                                   SW'(longint'($ceil(T)));
    assign th[r] = TH;
  end

  logic [SW-1:0]   acc, total;
  logic [CNTW-1:0] cnt;
  logic [2*BX-1:0] sq;
  logic [PXW-1:0]  red;

  assign sq    = (2*BX)'(x * x);
  assign total = acc + SW'(sq);

  always_comb begin
    red = '0;
    for (int r = 1; r <= BX_RED_MAX; r++)
      if (total >= th[r]) red = PXW'(r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      cnt    <= '0;
      done   <= 1'b0;
      bx_red <= '0;
      sum    <= '0;
    end else begin
      done <= 1'b0;
      if (en) begin
        if (cnt == CNTW'(L_WIN - 1)) begin
          cnt    <= '0;
          acc    <= '0;
          sum    <= total;
          bx_red <= red;
          done   <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= total;
        end
      end
    end
  end

endmodule
