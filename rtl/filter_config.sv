// filter_config -- filter-select decoder and coefficient table of the
// scalable B-spline DWT.
//
// From the selected filter bank it produces the control signals of the
// datapath and the quantised distributed-part coefficients 1/r, b/a, 1/a of
// the three distributed filters (upper W, flexible LW, cascaded second W):
//
//   filter | route_swap | upper W           | LW                      | 2nd W
//   9/7    | 0          | W_ab(z)   lp      | L_r(-z) hp              | unused
//   6/10   | 1          | W_ab(-z)  hp      | L_r(z)  lp              | unused
//   10/18  | 0          | W_a1b1(z) lp      | W_a0b0(-z) hp, cascade  | W_a2b2(-z) hp
//
// route_swap = 1 sends the high-pass B-spline chain to the upper W and the
// low-pass chain to LW (6/10, whose low-pass distributed part is L_r and
// high-pass part W_ab). The coefficient constants are the package's real
// values rounded to COEF_FRAC fractional bits at elaboration; coefficients
// of a filter that the selected bank leaves unused are driven to zero
// (this implementation's choice, so the idle multipliers stay quiet).
// The block is purely combinational.
module filter_config
  import bs_dwt_pkg::*;
#(
  parameter int COEF_W    = 9,
  parameter int COEF_FRAC = 4
) (
  input  filter_e                  filter_sel,
  output logic                     route_swap,  // G chain -> upper W
  output logic                     w1_hp,       // upper W high-pass
  output logic                     lw_mode,     // LW as W_ab (1) or L_r (0)
  output logic                     lw_hp,       // LW high-pass
  output logic                     cascade,     // output through 2nd W
  output logic signed [COEF_W-1:0] w1_ba, w1_ia,
  output logic signed [COEF_W-1:0] lw_ba, lw_ia, lw_ir,
  output logic signed [COEF_W-1:0] w2_ba, w2_ia
);
  localparam logic signed [COEF_W-1:0] Q_BA_9_7    = COEF_W'(quant(BA_9_7,    COEF_FRAC));
  localparam logic signed [COEF_W-1:0] Q_IA_9_7    = COEF_W'(quant(IA_9_7,    COEF_FRAC));
  localparam logic signed [COEF_W-1:0] Q_IR_9_7    = COEF_W'(quant(IR_9_7,    COEF_FRAC));
  localparam logic signed [COEF_W-1:0] Q_BA1_10_18 = COEF_W'(quant(BA1_10_18, COEF_FRAC));
  localparam logic signed [COEF_W-1:0] Q_IA1_10_18 = COEF_W'(quant(IA1_10_18, COEF_FRAC));
  localparam logic signed [COEF_W-1:0] Q_BA0_10_18 = COEF_W'(quant(BA0_10_18, COEF_FRAC));
  localparam logic signed [COEF_W-1:0] Q_IA0_10_18 = COEF_W'(quant(IA0_10_18, COEF_FRAC));
  localparam logic signed [COEF_W-1:0] Q_BA2_10_18 = COEF_W'(quant(BA2_10_18, COEF_FRAC));
  localparam logic signed [COEF_W-1:0] Q_IA2_10_18 = COEF_W'(quant(IA2_10_18, COEF_FRAC));

  always_comb begin
    route_swap = 1'b0;
    w1_hp      = 1'b0;
    lw_mode    = 1'b0;
    lw_hp      = 1'b1;
    cascade    = 1'b0;
    w1_ba = Q_BA_9_7;  w1_ia = Q_IA_9_7;
    lw_ba = '0;        lw_ia = '0;        lw_ir = Q_IR_9_7;
    w2_ba = '0;        w2_ia = '0;
    unique case (filter_sel)
      FILT_6_10: begin
        route_swap = 1'b1;
        w1_hp      = 1'b1;
        lw_hp      = 1'b0;
      end
      FILT_10_18: begin
        lw_mode = 1'b1;
        cascade = 1'b1;
        w1_ba = Q_BA1_10_18; w1_ia = Q_IA1_10_18;
        lw_ba = Q_BA0_10_18; lw_ia = Q_IA0_10_18; lw_ir = '0;
        w2_ba = Q_BA2_10_18; w2_ia = Q_IA2_10_18;
      end
      default: ;
    endcase
  end
endmodule
