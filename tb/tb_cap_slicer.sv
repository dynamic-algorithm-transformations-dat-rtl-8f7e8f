// tb_cap_slicer: random and edge inputs to the 64-CAP slicer. The reference
// searches the eight levels for the nearest one (upper level on a tie) and
// saturates the error to 14 bits.
module tb_cap_slicer;
  localparam int ACC_W = 18, FRAC = 12, EW = 14;
  logic signed [ACC_W-1:0] u;
  logic signed [3:0] dec;
  logic signed [EW-1:0] e;
  int checks = 0, failures = 0;

  cap_slicer #(.ACC_W(ACC_W), .FRAC(FRAC), .EW(EW)) dut (.u, .dec, .e);

  task automatic check(input int uv);
    int best, bd, ee;
    u = ACC_W'(uv);
    #1;
    best = 7; bd = 1 << 30;
    for (int l = 7; l >= -7; l -= 2) begin
      int dd = uv - l * (1 << FRAC);
      if (dd < 0) dd = -dd;
      if (dd < bd) begin bd = dd; best = l; end
    end
    ee = uv - best * (1 << FRAC);
    if (ee > (1 << (EW-1)) - 1) ee = (1 << (EW-1)) - 1;
    if (ee < -(1 << (EW-1)))    ee = -(1 << (EW-1));
    checks++;
    if (int'(dec) != best || int'(e) != ee) begin
      failures++;
      if (failures < 10) $display("FAIL u=%0d dec=%0d/%0d e=%0d/%0d", uv, dec, best, e, ee);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = -8; l <= 8; l++) begin
      check(l * 4096 * 2);
      check(l * 4096 * 2 - 1);
      check(l * 4096 * 2 + 1);
    end
    check(-(1 << 17)); check((1 << 17) - 1);
    for (int i = 0; i < 20000; i++) check($signed($urandom) >>> 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
