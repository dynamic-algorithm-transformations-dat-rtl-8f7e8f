// tb_data_precision_select: windows of random input with a random
// amplitude and shape (uniform, two-level, or sparse), so the input's
// peak-to-average ratio covers all three outcomes 0, 1 and 2 bits. Short
// 64-sample windows; en is dropped at random. The reference computes
// PAR = 10*log10(L * x_max^2 / sum(x^2)) in real arithmetic and
// bx_red = clamp(floor((14 - PAR)/6), 0, 2). Checks per window: done comes
// exactly after the L-th enabled sample, sum is exact, bx_red matches and
// holds until the next window; each outcome must occur.
module tb_data_precision_select;
  localparam int BX = 8, L = 64, WINDOWS = 400;
  localparam real PAR_MAX = 14.0;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [BX-1:0] x = 0;
  logic done;
  logic [1:0] bx_red;
  logic [2*BX+5:0] sum;

  data_precision_select #(.BX(BX), .BX_RED_MAX(2), .L_WIN(L), .PAR_MAX_DB(PAR_MAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen[3] = '{0, 0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int sample(input int shape, input int amp);
    case (shape)
      0: return int'($urandom_range(0, 2 * amp)) - amp;          // uniform
      1: return ($urandom_range(0, 1) != 0) ? amp : -amp;        // two-level
      default: return ($urandom_range(0, 7) == 0) ? amp : 0;     // sparse
    endcase
  endfunction

  initial begin
    int acc, exp_red, shape, amp, v, n;
    logic [1:0] held;
    real par;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(bx_red == 0, "bx_red not 0 after reset");
    for (int w = 0; w < WINDOWS; w++) begin
      shape = $urandom_range(0, 2);
      amp   = (w % 5 == 0) ? 128 : int'($urandom_range(4, 127));
      acc   = 0;
      held  = bx_red;
      n     = 0;
      while (n < L) begin
        @(negedge clk);
        check(!done, "done outside the end of a window");
        check(bx_red == held, "bx_red changed inside a window");
        if ($urandom_range(0, 3) == 0) begin
          en = 0;
        end else begin
          v = sample(shape, amp);
          if (v > 127) v = (shape == 1 && v > 0) ? 127 : -128;
          en = 1;
          x  = BX'(v);
          acc += v * v;
          n++;
        end
      end
      @(negedge clk);
      en = 0;
      check(done, $sformatf("window %0d: no done after %0d samples", w, L));
      check(int'(sum) == acc, $sformatf("window %0d: sum %0d expected %0d", w, sum, acc));
      if (acc == 0) exp_red = 0;
      else begin
        par = 10.0 * $log10(real'(L) * 16384.0 / real'(acc));
        exp_red = int'($floor((PAR_MAX - par) / 6.0));
        if (exp_red < 0) exp_red = 0;
        if (exp_red > 2) exp_red = 2;
      end
      check(int'(bx_red) == exp_red,
            $sformatf("window %0d: bx_red %0d expected %0d (sum %0d)", w, bx_red, exp_red, acc));
      seen[exp_red]++;
    end
    for (int r = 0; r < 3; r++)
      check(seen[r] > 0, $sformatf("reduction %0d never exercised", r));
    $display("windows with reduction 0/1/2: %0d/%0d/%0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WINDOWS * L * 3) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
