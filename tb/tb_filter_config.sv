// tb_filter_config -- checks the filter-select decoder: the control signals
// of each filter bank and its coefficients, which must be the distributed-
// part constants 1/r, b/a, 1/a rounded to 4 fractional bits:
//   9/7 and 6/10: b/a = -1.0793 -> -17, 1/a = 6.8477 -> 110, 1/r = -2.9207 -> -47
//   10/18: b1/a1 -> -42, 1/a1 -> 167, b0/a0 -> -103, 1/a0 -> 194,
//          b2/a2 -> 33, 1/a2 -> 117
module tb_filter_config;
  import bs_dwt_pkg::*;
  localparam int COEF_W = 9, COEF_FRAC = 4;
  filter_e filter_sel;
  logic route_swap, w1_hp, lw_mode, lw_hp, cascade;
  logic signed [COEF_W-1:0] w1_ba, w1_ia, lw_ba, lw_ia, lw_ir, w2_ba, w2_ia;

  filter_config #(.COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) dut (
    .filter_sel (filter_sel), .route_swap (route_swap), .w1_hp (w1_hp),
    .lw_mode (lw_mode), .lw_hp (lw_hp), .cascade (cascade),
    .w1_ba (w1_ba), .w1_ia (w1_ia), .lw_ba (lw_ba), .lw_ia (lw_ia),
    .lw_ir (lw_ir), .w2_ba (w2_ba), .w2_ia (w2_ia));

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (%s): got %0d expected %0d", what, filter_sel.name(), got, exp);
    end
  endtask

  initial begin
    filter_sel = FILT_9_7; #1;
    expect_eq("route_swap", route_swap, 0); expect_eq("w1_hp", w1_hp, 0);
    expect_eq("lw_mode", lw_mode, 0);       expect_eq("lw_hp", lw_hp, 1);
    expect_eq("cascade", cascade, 0);
    expect_eq("w1_ba", w1_ba, -17); expect_eq("w1_ia", w1_ia, 110);
    expect_eq("lw_ir", lw_ir, -47);

    filter_sel = FILT_6_10; #1;
    expect_eq("route_swap", route_swap, 1); expect_eq("w1_hp", w1_hp, 1);
    expect_eq("lw_mode", lw_mode, 0);       expect_eq("lw_hp", lw_hp, 0);
    expect_eq("cascade", cascade, 0);
    expect_eq("w1_ba", w1_ba, -17); expect_eq("w1_ia", w1_ia, 110);
    expect_eq("lw_ir", lw_ir, -47);

    filter_sel = FILT_10_18; #1;
    expect_eq("route_swap", route_swap, 0); expect_eq("w1_hp", w1_hp, 0);
    expect_eq("lw_mode", lw_mode, 1);       expect_eq("lw_hp", lw_hp, 1);
    expect_eq("cascade", cascade, 1);
    expect_eq("w1_ba", w1_ba, -42);  expect_eq("w1_ia", w1_ia, 167);
    expect_eq("lw_ba", lw_ba, -103); expect_eq("lw_ia", lw_ia, 194);
    expect_eq("w2_ba", w2_ba, 33);   expect_eq("w2_ia", w2_ia, 117);

    // quantisation function itself at another precision (k = 12)
    expect_eq("quant k=12", quant(IA_9_7, 12), 28048);
    expect_eq("quant k=12 neg", quant(IR_9_7, 12), -11963);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
