// lw_filter -- flexible distributed filter LW(z): one datapath for both
// L_r(z) and W_ab(z).
//
// L_r(z) = alpha0 + alpha1 (z + z^-1), alpha0 = 1 - 1/(2r), alpha1 = 1/(4r),
// can be written y = p0 - (1/r)(p0/2 -/+ p1/4), which is the W_ab(z)
// datapath with b/a replaced by 1/r and 1/a replaced by 0. Two coefficient
// multiplexers driven by lw_mode select between the two filters, as in the
// published flexible LW(z) module:
//     lw_mode = 1: upper multiplier gets b/a, lower gets 1/a  -> W_ab(+/-z)
//     lw_mode = 0: upper multiplier gets 1/r, lower gets 0    -> L_r(+/-z)
// hp selects the mirrored (high-pass) version as in wab_filter. The L_r(z)
// filter therefore exists in this design only as the L mode of this block.
// Number formats and timing are those of wab_filter (combinational).
module lw_filter #(
  parameter int DATA_W    = 16,
  parameter int COEF_W    = 9,
  parameter int COEF_FRAC = 4
) (
  input  logic                     lw_mode, // 1: W_ab, 0: L_r
  input  logic                     hp,
  input  logic signed [COEF_W-1:0] c_ba,    // b/a
  input  logic signed [COEF_W-1:0] c_ia,    // 1/a
  input  logic signed [COEF_W-1:0] c_ir,    // 1/r
  input  logic signed [DATA_W-1:0] x_m2,
  input  logic signed [DATA_W-1:0] x_m1,
  input  logic signed [DATA_W-1:0] x_0,
  input  logic signed [DATA_W-1:0] x_p1,
  input  logic signed [DATA_W-1:0] x_p2,
  output logic signed [DATA_W-1:0] y
);
  logic signed [COEF_W-1:0] c_top, c_bot;

  assign c_top = lw_mode ? c_ba : c_ir;
  assign c_bot = lw_mode ? c_ia : '0;

  wab_filter #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_core (
    .hp   (hp),
    .c_ba (c_top),
    .c_ia (c_bot),
    .x_m2 (x_m2), .x_m1 (x_m1), .x_0 (x_0), .x_p1 (x_p1), .x_p2 (x_p2),
    .y    (y)
  );
endmodule
