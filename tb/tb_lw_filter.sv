// tb_lw_filter -- checks the flexible LW filter in both modes. In L mode
// the result must be L_r(+/-z) = alpha0 +/- alpha1 (z+z^-1) with
// alpha0 = 1 - 1/(2r), alpha1 = 1/(4r) (x[n+/-2] and 1/a ignored); in W mode
// W_ab(+/-z) as in tb_wab_filter (1/r ignored). Random windows and 9-bit
// coefficients with k = 4; 1 LSB of rounding error is allowed.
module tb_lw_filter;
  localparam int DATA_W = 16, COEF_W = 9, COEF_FRAC = 4;
  logic lw_mode, hp;
  logic signed [COEF_W-1:0] c_ba, c_ia, c_ir;
  logic signed [DATA_W-1:0] x [5];
  logic signed [DATA_W-1:0] y;

  lw_filter #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) dut (
    .lw_mode (lw_mode), .hp (hp), .c_ba (c_ba), .c_ia (c_ia), .c_ir (c_ir),
    .x_m2 (x[0]), .x_m1 (x[1]), .x_0 (x[2]), .x_p1 (x[3]), .x_p2 (x[4]), .y (y));

  int checks = 0, failures = 0, n_l = 0, n_w = 0;

  initial begin
    for (int i = 0; i < 20000; i++) begin
      real ba, ia, ir, exp, e, k0, k1, k2;
      lw_mode = 1'($urandom_range(0, 1));
      hp      = 1'($urandom_range(0, 1));
      c_ba = COEF_W'($urandom_range(0, 511));
      c_ia = COEF_W'($urandom_range(0, 511));
      c_ir = COEF_W'($urandom_range(0, 511));
      for (int j = 0; j < 5; j++) x[j] = DATA_W'(int'($urandom_range(0, 4000)) - 2000);
      #1;
      ba = real'(c_ba) / 16.0;
      ia = real'(c_ia) / 16.0;
      ir = real'(c_ir) / 16.0;
      if (lw_mode) begin
        n_w++;
        k0 = 1.0 - ba / 2.0 + 3.0 * ia / 8.0;
        k1 = (ba - ia) / 4.0;
        k2 = ia / 16.0;
      end else begin
        n_l++;
        k0 = 1.0 - ir / 2.0;
        k1 = ir / 4.0;
        k2 = 0.0;
      end
      if (hp) k1 = -k1;
      exp = k0 * real'(x[2]) + k1 * (real'(x[1]) + real'(x[3])) +
            k2 * (real'(x[0]) + real'(x[4]));
      if (exp > 32767.0)  exp = 32767.0;
      if (exp < -32768.0) exp = -32768.0;
      e = real'(y) - exp;
      checks++;
      if (e > 1.0 || e < -1.0) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d hp=%0d: got %0d expected %0.2f",
                                    lw_mode, hp, y, exp);
      end
    end
    if (n_l == 0 || n_w == 0) failures++;
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
