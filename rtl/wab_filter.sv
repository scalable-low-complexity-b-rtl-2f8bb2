// wab_filter -- distributed-part filter W_ab(z) in matrix form.
//
// W_ab(z) = beta0 + beta1 (z + z^-1) + beta2 (z^2 + z^-2) with
// beta0 = 1 - b/(2a) + 3/(8a), beta1 = (b-1)/(4a), beta2 = 1/(16a) is
// evaluated as
//     y = p0 - (b/a) (p0/2 -/+ p1/4) + (1/a) (3 p0/8 -/+ p1/4 + p2/16)
// with p0 = x[n], p1 = x[n-1] + x[n+1], p2 = x[n-2] + x[n+2]. All weights
// 1/2, 1/4, 3/8, 1/16 are shifts, so only two multipliers remain. The lower
// sign (hp = 1) gives W_ab(-z), used where the filter belongs to a
// high-pass branch. This is the published structure: a pre-adder network
// of shifts and adders, multipliers by b/a (subtracted) and 1/a (added), and
// a final adder that adds p0.
//
// Number formats (this implementation's choice): the pre-adder network is
// kept exact by scaling it by 16 (DATA_W+5 bits), so the multiplier
// operands are (DATA_W+5) x COEF_W; each product is rounded (round half up)
// back to the data scale, i.e. shifted right by COEF_FRAC+4; the result is
// saturated to DATA_W bits. Coefficients are two's complement with
// COEF_FRAC fractional bits. The block is purely combinational.
module wab_filter #(
  parameter int DATA_W    = 16,
  parameter int COEF_W    = 9,
  parameter int COEF_FRAC = 4
) (
  input  logic                     hp,      // 0: W_ab(z), 1: W_ab(-z)
  input  logic signed [COEF_W-1:0] c_ba,    // b/a
  input  logic signed [COEF_W-1:0] c_ia,    // 1/a
  input  logic signed [DATA_W-1:0] x_m2,
  input  logic signed [DATA_W-1:0] x_m1,
  input  logic signed [DATA_W-1:0] x_0,
  input  logic signed [DATA_W-1:0] x_p1,
  input  logic signed [DATA_W-1:0] x_p2,
  output logic signed [DATA_W-1:0] y
);
  localparam int SW    = DATA_W + 5;          // pre-adder width, scale 16
  localparam int MW    = SW + COEF_W;         // product width
  localparam int SHIFT = COEF_FRAC + 4;
  localparam int YW    = MW + 2;              // final sum width

  logic signed [SW-1:0] p0, p1, p2, t, s1, s2;
  logic signed [MW-1:0] m1, m2;
  logic signed [MW-1:0] r1, r2;
  logic signed [YW-1:0] ysum;

  localparam logic signed [DATA_W-1:0] YMAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam logic signed [DATA_W-1:0] YMIN = {1'b1, {(DATA_W-1){1'b0}}};

  always_comb begin
    p0 = SW'(x_0);
    p1 = SW'(x_m1) + SW'(x_p1);
    p2 = SW'(x_m2) + SW'(x_p2);
    // 16 * (p2/16 -/+ p1/4)
    t  = hp ? (p2 + (p1 <<< 2)) : (p2 - (p1 <<< 2));
    // 16 * (p0/2 -/+ p1/4)
    s1 = hp ? ((p0 <<< 3) + (p1 <<< 2)) : ((p0 <<< 3) - (p1 <<< 2));
    // 16 * (p0/2 - p0/8) + t = 16 * (3p0/8 -/+ p1/4 + p2/16)
    s2 = ((p0 <<< 3) - (p0 <<< 1)) + t;
    m1 = MW'(s1) * MW'(c_ba);
    m2 = MW'(s2) * MW'(c_ia);
    r1 = (m1 + (MW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    r2 = (m2 + (MW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    ysum = YW'(p0) - YW'(r1) + YW'(r2);
    if (ysum > YW'(YMAX))      y = YMAX;
    else if (ysum < YW'(YMIN)) y = YMIN;
    else                       y = ysum[DATA_W-1:0];
  end
endmodule
