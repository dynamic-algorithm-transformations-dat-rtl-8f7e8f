// tb_mult_energy_model: exhaustive check of the multiplier energy model for
// 12-bit coefficients. The reference evaluates N1 (ones count) and
// N2 = BW - sum_j prod_{i=j}^{BW-1} (1 - w^(i)) literally, with w^(0) the
// sign bit and w^(BW-1) the LSB, and expects n10 = 9*N1 + N2.
module tb_mult_energy_model;
  localparam int BW = 12;
  localparam int NW = $clog2(10 * BW + 1);
  logic [BW-1:0] w;
  logic [NW-1:0] n1, n2, n10;
  int checks = 0, failures = 0;

  mult_energy_model #(.BW(BW)) dut (.w, .n1, .n2, .n10);

  function automatic int ref_n2(input logic [BW-1:0] v);
    int s = 0;
    for (int j = 0; j < BW; j++) begin
      int p = 1;
      for (int i = j; i < BW; i++) p = p * (1 - int'(v[BW-1-i]));
      s += p;
    end
    return BW - s;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << BW); v++) begin
      int e1, e2;
      w = BW'(v);
      #1;
      e1 = $countones(w);
      e2 = ref_n2(w);
      checks++;
      if (int'(n1) != e1 || int'(n2) != e2 || int'(n10) != 9 * e1 + e2) begin
        failures++;
        if (failures < 10)
          $display("FAIL w=%b n1=%0d/%0d n2=%0d/%0d n10=%0d", w, n1, e1, n2, e2, n10);
      end
    end
    // Hand-worked case: ...0100 has one 1 and two LSB zeros: N=0.9*1+0.1*10.
    w = 12'b0000_0000_0100; #1;
    checks++;
    if (n10 != 19) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
