// tb_wab_filter -- checks the W_ab distributed filter against its
// polynomial form W_ab(+/-z) = beta0 +/- beta1 (z+z^-1) + beta2 (z^2+z^-2),
// beta0 = 1 - b/(2a) + 3/(8a), beta1 = (b-1)/(4a), beta2 = 1/(16a), for
// random windows, random 9-bit coefficients (k = 4) and both lp/hp signs.
// The two rounded products allow 1 LSB of error; a result outside the
// 16-bit range must saturate.
module tb_wab_filter;
  localparam int DATA_W = 16, COEF_W = 9, COEF_FRAC = 4;
  logic hp;
  logic signed [COEF_W-1:0] c_ba, c_ia;
  logic signed [DATA_W-1:0] x [5];    // x[n-2] .. x[n+2]
  logic signed [DATA_W-1:0] y;

  wab_filter #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) dut (
    .hp (hp), .c_ba (c_ba), .c_ia (c_ia),
    .x_m2 (x[0]), .x_m1 (x[1]), .x_0 (x[2]), .x_p1 (x[3]), .x_p2 (x[4]), .y (y));

  int checks = 0, failures = 0, n_sat = 0, n_hp = 0;

  initial begin
    for (int i = 0; i < 20000; i++) begin
      real ba, ia, b0, b1, b2, exp, e;
      int amp;
      amp  = (i % 4 == 0) ? 32767 : 3000;
      hp   = 1'($urandom_range(0, 1));
      c_ba = COEF_W'($urandom_range(0, 511));
      c_ia = COEF_W'($urandom_range(0, 511));
      for (int j = 0; j < 5; j++) x[j] = DATA_W'(int'($urandom_range(0, 2*amp)) - amp);
      #1;
      ba = real'(c_ba) / real'(1 << COEF_FRAC);
      ia = real'(c_ia) / real'(1 << COEF_FRAC);
      b0 = 1.0 - ba / 2.0 + 3.0 * ia / 8.0;
      b1 = (ba - 1.0 * ia) / 4.0;      // (b-1)/(4a) = (b/a - 1/a)/4
      b2 = ia / 16.0;
      if (hp) b1 = -b1;
      exp = b0 * real'(x[2]) + b1 * (real'(x[1]) + real'(x[3])) +
            b2 * (real'(x[0]) + real'(x[4]));
      if (hp) n_hp++;
      if (exp > 32767.0) begin exp = 32767.0; n_sat++; end
      if (exp < -32768.0) begin exp = -32768.0; n_sat++; end
      e = real'(y) - exp;
      checks++;
      if (e > 1.0 || e < -1.0) begin
        failures++;
        if (failures < 10) $display("FAIL hp=%0d ba=%0d ia=%0d: got %0d expected %0.2f",
                                    hp, c_ba, c_ia, y, exp);
      end
    end
    if (n_sat == 0 || n_hp == 0) failures++;
    $display("saturated cases %0d, high-pass cases %0d", n_sat, n_hp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
