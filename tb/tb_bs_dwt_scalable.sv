// tb_bs_dwt_scalable -- end-to-end test of the scalable B-spline DWT at its
// default parameters (16-bit data, 9-bit coefficients with 4 fractional
// bits, the quantised configuration). Streams 3600 samples with random
// input gaps through all three filter banks with five on-line switches and
// compares every settled output with a floating-point model; see
// dwt_e2e_check for the details of the checks.
module tb_bs_dwt_scalable;
  dwt_e2e_check #(.COEF_W (9), .COEF_FRAC (4),
                  .TOL_LOW (10.0), .TOL_HIGH (10.0), .TOL_CASC (90.0)) u_check ();

  initial begin
    wait (u_check.done);
    $finish;
  end
endmodule
