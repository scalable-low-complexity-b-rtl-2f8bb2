// bs_dwt_scalable -- scalable one-dimensional forward DWT based on the
// B-spline factorisation, switching on line among the 9/7, 6/10 and 10/18
// wavelet filter banks.
//
// Each analysis filter is factored as
//     H(z) = z^dH ((1+z^-1)/2)^gH Q(z),   G(z) = z^dG ((1-z^-1)/2)^gG R(z)
// The B-spline terms need no multipliers and are computed in polyphase form
// by two chains of halving adder stages (5 x (1+z^-1)/2 with taps at 3, 4, 5
// and 9 x (1-z^-1)/2 with taps at 4, 5, 9; (gH, gG) = (4,4) for 9/7, (3,5)
// for 6/10 and (5,9) for 10/18). The distributed parts Q and R are products
// of L_r(z) (real root) and W_ab(z) (complex pair) filters. The three banks
// share their structure, so three distributed filters cover them all: an
// upper W_ab, a flexible LW (L_r or W_ab) and a second W_ab that is always
// high-pass and only used by the 10/18 bank, whose R is W_a0b0(-z)W_a2b2(-z).
// A swap multiplexer column routes the low-pass chain to the upper W and the
// high-pass chain to LW (9/7, 10/18) or the other way round (6/10), and an
// output multiplexer picks LW or the second W. That structure, the tap
// points and the coefficient selection follow the published architecture; everything about
// timing and number format below is this implementation's choice.
//
// Interface and timing:
//   * u is one sample per clock when in_valid is high; gaps are allowed.
//     The first sample after reset is u[0]; earlier samples count as zero.
//   * The B-spline chains and the window registers advance once per pair,
//     on each even-indexed sample 2m (chains are combinational, one z^-1
//     register per stage, as in the published architecture; no pipelining).
//   * On each odd-indexed sample 2m+1 the outputs are registered, and
//     out_valid is high for one cycle after it. With v_H = ((1+z^-1)/2)^gH u
//     and v_G = ((1-z^-1)/2)^gG u, both causal, the pair m output is
//        9/7, 10/18: y_hg = Q(v_H) at 2m-2 (low-pass)
//        9/7:        y_gh = R(v_G) at 2m-2 (high-pass)
//        6/10:       y_hg = R(v_G) at 2m-2 (high-pass),
//                    y_gh = Q(v_H) at 2m-2 (low-pass)
//        10/18:      y_gh = W_a2b2(-z)(x~) at 2m-6 with x~ = W_a0b0(-z)(v_G)
//     y_hg_is_low tells which output is the low-pass one.
//   * For 10/18 the intermediate signal x~ must exist at every sample, not
//     only at even ones, so LW works twice per pair: on the odd input sample
//     it computes x~ at the odd centre 2m-3 (from a window that uses one
//     extra x_o register), on the next even sample x~ at 2m-2. Both values
//     enter the five-register tap line of the second W.
//   * Changing filter_sel takes effect at once; outputs are meaningless
//     until the registers have refilled (about 12 input samples).
//   * Halving stages truncate; each multiplier output is rounded; filter
//     outputs saturate to DATA_W bits. Coefficients have COEF_FRAC
//     fractional bits (k = 4 with 9-bit coefficients by default).
module bs_dwt_scalable
  import bs_dwt_pkg::*;
#(
  parameter int DATA_W    = 16,
  parameter int COEF_W    = 9,
  parameter int COEF_FRAC = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  filter_e                  filter_sel,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] u,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] y_hg,
  output logic signed [DATA_W-1:0] y_gh,
  output logic                     y_hg_is_low
);
  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // ---------------- control and coefficients ----------------
  logic  route_swap, w1_hp, lw_mode, lw_hp, cascade;
  coef_t w1_ba, w1_ia, lw_ba, lw_ia, lw_ir, w2_ba, w2_ia;

  filter_config #(.COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_cfg (
    .filter_sel (filter_sel),
    .route_swap (route_swap), .w1_hp (w1_hp), .lw_mode (lw_mode),
    .lw_hp (lw_hp), .cascade (cascade),
    .w1_ba (w1_ba), .w1_ia (w1_ia),
    .lw_ba (lw_ba), .lw_ia (lw_ia), .lw_ir (lw_ir),
    .w2_ba (w2_ba), .w2_ia (w2_ia)
  );

  // ---------------- polyphase split ----------------
  logic    pair_en, out_en, odd_phase;
  sample_t u_even, u_odd;

  poly_split #(.DATA_W(DATA_W)) u_split (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .u (u),
    .pair_en (pair_en), .out_en (out_en), .odd_phase_o (odd_phase),
    .even_o (u_even), .odd_o (u_odd)
  );

  // ---------------- B-spline chains ----------------
  sample_t h_e, h_o, g_e, g_o;

  bs_chain #(.DATA_W(DATA_W), .N_STAGES(5), .MINUS(1'b0),
             .TAP_9_7(4), .TAP_6_10(3), .TAP_10_18(5)) u_chain_h (
    .clk (clk), .rst_n (rst_n), .en (pair_en), .filter_sel (filter_sel),
    .a (u_even), .b (u_odd), .x_e (h_e), .x_o (h_o)
  );

  bs_chain #(.DATA_W(DATA_W), .N_STAGES(9), .MINUS(1'b1),
             .TAP_9_7(4), .TAP_6_10(5), .TAP_10_18(9)) u_chain_g (
    .clk (clk), .rst_n (rst_n), .en (pair_en), .filter_sel (filter_sel),
    .a (u_even), .b (u_odd), .x_e (g_e), .x_o (g_o)
  );

  // ---------------- swap multiplexer column ----------------
  sample_t xe_up, xo_up, xe_lo, xo_lo;

  always_comb begin
    if (route_swap) begin
      xe_up = g_e; xo_up = g_o; xe_lo = h_e; xo_lo = h_o;
    end else begin
      xe_up = h_e; xo_up = h_o; xe_lo = g_e; xo_lo = g_o;
    end
  end

  // ---------------- upper W_ab ----------------
  sample_t wu_p2, wu_p1, wu_0, wu_m1, wu_m2, y_w1;

  phase_window #(.DATA_W(DATA_W), .ODD_WINDOW(1'b0)) u_win_up (
    .clk (clk), .rst_n (rst_n), .en (pair_en), .sel_odd (1'b0),
    .x_e (xe_up), .x_o (xo_up),
    .w_p2 (wu_p2), .w_p1 (wu_p1), .w_0 (wu_0), .w_m1 (wu_m1), .w_m2 (wu_m2)
  );

  wab_filter #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_w1 (
    .hp (w1_hp), .c_ba (w1_ba), .c_ia (w1_ia),
    .x_m2 (wu_m2), .x_m1 (wu_m1), .x_0 (wu_0), .x_p1 (wu_p1), .x_p2 (wu_p2),
    .y (y_w1)
  );

  // ---------------- flexible LW ----------------
  sample_t wl_p2, wl_p1, wl_0, wl_m1, wl_m2, y_lw;
  logic    sel_odd;

  assign sel_odd = cascade & odd_phase;

  phase_window #(.DATA_W(DATA_W), .ODD_WINDOW(1'b1)) u_win_lo (
    .clk (clk), .rst_n (rst_n), .en (pair_en), .sel_odd (sel_odd),
    .x_e (xe_lo), .x_o (xo_lo),
    .w_p2 (wl_p2), .w_p1 (wl_p1), .w_0 (wl_0), .w_m1 (wl_m1), .w_m2 (wl_m2)
  );

  lw_filter #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_lw (
    .lw_mode (lw_mode), .hp (lw_hp),
    .c_ba (lw_ba), .c_ia (lw_ia), .c_ir (lw_ir),
    .x_m2 (wl_m2), .x_m1 (wl_m1), .x_0 (wl_0), .x_p1 (wl_p1), .x_p2 (wl_p2),
    .y (y_lw)
  );

  // ---------------- cascaded second W_ab (always high-pass) ----------------
  sample_t t_p2, t_p1, t_0, t_m1, t_m2, y_w2;

  tap_line #(.DATA_W(DATA_W)) u_taps (
    .clk (clk), .rst_n (rst_n), .en (in_valid & cascade), .x_in (y_lw),
    .t_p2 (t_p2), .t_p1 (t_p1), .t_0 (t_0), .t_m1 (t_m1), .t_m2 (t_m2)
  );

  wab_filter #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_w2 (
    .hp (1'b1), .c_ba (w2_ba), .c_ia (w2_ia),
    .x_m2 (t_m2), .x_m1 (t_m1), .x_0 (t_0), .x_p1 (t_p1), .x_p2 (t_p2),
    .y (y_w2)
  );

  // ---------------- output multiplexer and registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      y_hg        <= '0;
      y_gh        <= '0;
      y_hg_is_low <= 1'b1;
    end else begin
      out_valid <= out_en;
      if (out_en) begin
        y_hg        <= y_w1;
        y_gh        <= cascade ? y_w2 : y_lw;
        y_hg_is_low <= ~w1_hp;
      end
    end
  end
endmodule
