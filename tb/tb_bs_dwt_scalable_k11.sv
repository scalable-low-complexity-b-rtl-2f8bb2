// tb_bs_dwt_scalable_k11 -- end-to-end test of the scalable B-spline DWT
// in its unquantised-reference configuration: 16-bit coefficients with 11
// fractional bits (16-by-16 multipliers; 11 is the largest k at which the
// largest coefficient, 1/a0 = 12.11 of the 10/18 bank, still fits 16 bits).
// Same stimulus and checks as the default configuration (dwt_e2e_check).
module tb_bs_dwt_scalable_k11;
  dwt_e2e_check #(.COEF_W (16), .COEF_FRAC (11),
                  .TOL_LOW (10.0), .TOL_HIGH (10.0), .TOL_CASC (90.0)) u_check ();

  initial begin
    wait (u_check.done);
    $finish;
  end
endmodule
