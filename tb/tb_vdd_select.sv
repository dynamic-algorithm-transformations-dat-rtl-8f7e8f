// tb_vdd_select: every tap count 0..30. The reference evaluates the closed
// form Vdd(r) = Vt + r*Vo/2 + sqrt(r^2*Vo^2/4 + r*Vt*Vo), r = Tcp/Ts, in real
// arithmetic and rounds up to the next 0.1 V level above 1.0 V. The code
// must also never rise when taps are removed.
module tb_vdd_select;
  logic [4:0] n_on;
  logic [3:0] bv;
  int checks = 0, failures = 0;

  vdd_select #(.N(30), .B_ADD(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev = 0;
    for (int n = 0; n <= 30; n++) begin
      real tcp, r, vo, v;
      int lvl;
      tcp = 4.0 + 30 * 0.1 + 16 * 0.6 + n * 0.7;      // ns
      r = tcp / 38.0;
      vo = (2.5 - 0.5) ** 2 / 2.5;
      v = 0.5 + r * vo / 2.0 + $sqrt(r * r * vo * vo / 4.0 + r * 0.5 * vo);
      lvl = int'($ceil((v - 1.0) / 0.1 - 1e-9));
      if (lvl > 15) lvl = 15;
      n_on = 5'(n); #1;
      checks++;
      if (int'(bv) != lvl) begin
        failures++;
        $display("FAIL n=%0d bv=%0d exp %0d (Vdd=%f)", n, bv, lvl, v);
      end
      checks++;
      if (n > 0 && int'(bv) < prev) failures++;
      prev = int'(bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
