// dwt_e2e_check -- end-to-end check of the scalable B-spline DWT, shared by
// the testbenches of its coefficient configurations. With COEF_W=9 and
// COEF_FRAC=4 (the design's defaults) the DUT is instantiated with no
// parameter overrides at all.
//
// A pseudo-random signal (sine plus noise) streams through the design with
// random gaps in in_valid. The filter bank is switched on line
// 9/7 -> 6/10 -> 10/18 -> 9/7 -> 10/18 -> 6/10. Every output pair is compared
// with a floating-point model written directly from the filter definitions:
//   v_H = ((1+z^-1)/2)^gH u, v_G = ((1-z^-1)/2)^gG u (binomial sums),
//   L_r(z) = alpha0 + alpha1 (z+z^-1), W_ab(z) = beta0 + beta1 (z+z^-1)
//   + beta2 (z^2+z^-2), with z -> -z for high-pass use, evaluated with the
//   coefficients 1/r, b/a, 1/a rounded at COEF_FRAC fractional bits.
// Output pair m corresponds to centre 2m-2 (and to 2m-6 for the cascaded
// 10/18 high-pass path). The first outputs after a switch are not checked
// while the registers refill. The fixed-point error allowed is TOL_* LSB.
// It also checks that out_valid follows each odd input sample by exactly one
// cycle, and that every mechanism (each bank, the lp/hp swap, LW in L and W
// mode, the cascade, on-line switching, input gaps) was exercised.
// When it has printed its result it raises done; the testbench that
// instantiates it then ends the simulation.
module dwt_e2e_check #(
  parameter int COEF_W    = 9,
  parameter int COEF_FRAC = 4,
  parameter real TOL_LOW  = 10.0,    // allowed error, LSB
  parameter real TOL_HIGH = 10.0,
  parameter real TOL_CASC = 90.0
) ();
  import bs_dwt_pkg::*;

  localparam int DATA_W   = 16;
  localparam int SEG      = 600;       // input samples per filter segment
  localparam int NSEG     = 6;
  localparam int NS       = SEG * NSEG;
  localparam int SETTLE   = 8;         // unchecked output pairs after a switch
  localparam int WATCHDOG = 40 * NS;

  // Distributed-part constants (roots of Phi_3 and Phi_6), rounded here
  // independently of the design's own table.
  localparam real SCALE = real'(64'd1 << COEF_FRAC);
  function automatic int qk(real v);
    return (v >= 0.0) ? int'($floor(v * SCALE + 0.5)) : -int'($floor(-v * SCALE + 0.5));
  endfunction
  localparam int K_BA   = qk(-1.079303580344), K_IA  = qk(6.847681897167);
  localparam int K_IR   = qk(-2.920696419656);
  localparam int K_BA1  = qk(-2.603974030008), K_IA1 = qk(10.445744319527);
  localparam int K_BA0  = qk(-6.457178409811), K_IA0 = qk(12.114739453982);
  localparam int K_BA2  = qk(2.061152439819),  K_IA2 = qk(7.301607799117);

  logic clk = 1'b0, rst_n = 1'b0;
  filter_e filter_sel;
  logic in_valid;
  logic signed [DATA_W-1:0] u;
  logic out_valid, y_hg_is_low;
  logic signed [DATA_W-1:0] y_hg, y_gh;

  if (COEF_W == 9 && COEF_FRAC == 4) begin : g_default
    bs_dwt_scalable dut (
      .clk (clk), .rst_n (rst_n), .filter_sel (filter_sel),
      .in_valid (in_valid), .u (u),
      .out_valid (out_valid), .y_hg (y_hg), .y_gh (y_gh),
      .y_hg_is_low (y_hg_is_low)
    );
  end else begin : g_custom
    bs_dwt_scalable #(.COEF_W (COEF_W), .COEF_FRAC (COEF_FRAC)) dut (
      .clk (clk), .rst_n (rst_n), .filter_sel (filter_sel),
      .in_valid (in_valid), .u (u),
      .out_valid (out_valid), .y_hg (y_hg), .y_gh (y_gh),
      .y_hg_is_low (y_hg_is_low)
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  logic done = 1'b0;    // raised once the result line has been printed

  // Input history and reference signals (index = sample number).
  real ux [NS];
  filter_e seg_filter [NSEG] = '{FILT_9_7, FILT_6_10, FILT_10_18, FILT_9_7,
                                 FILT_10_18, FILT_6_10};

  // Mechanism counters.
  int n_out [3];
  int n_switch = 0, n_gaps = 0, n_swap = 0, n_lmode = 0, n_wmode = 0, n_casc = 0;
  real maxerr_lo [3], maxerr_hi [3];

  function automatic real binom(int n, int k);
    real r = 1.0;
    for (int i = 1; i <= k; i++) r = r * real'(n - k + i) / real'(i);
    return r;
  endfunction

  function automatic real getu(int n);
    return (n < 0 || n >= NS) ? 0.0 : ux[n];
  endfunction

  // B-spline output of order g, low-pass (minus=0) or high-pass (minus=1).
  function automatic real bspl(int g, bit minus, int n);
    real s = 0.0;
    for (int k = 0; k <= g; k++)
      s += ((minus && (k % 2 == 1)) ? -1.0 : 1.0) * binom(g, k) * getu(n - k);
    return s / real'(1 << g);
  endfunction

  // W_ab with integer coefficients at COEF_FRAC fractional bits.
  function automatic real wab(real x_m2, real x_m1, real x0, real x_p1, real x_p2,
                              int ba, int ia, bit hp);
    real b_a = real'(ba) / SCALE, i_a = real'(ia) / SCALE;
    real b0 = 1.0 - b_a / 2.0 + 3.0 * i_a / 8.0;
    real b1 = (b_a - i_a) / 4.0;
    real b2 = i_a / 16.0;
    return b0 * x0 + (hp ? -b1 : b1) * (x_m1 + x_p1) + b2 * (x_m2 + x_p2);
  endfunction

  function automatic real lr(real x_m1, real x0, real x_p1, int ir, bit hp);
    real a0 = 1.0 - (real'(ir) / SCALE) / 2.0;
    real a1 = (real'(ir) / SCALE) / 4.0;
    return a0 * x0 + (hp ? -a1 : a1) * (x_m1 + x_p1);
  endfunction

  function automatic real w_on_bspl(int g, bit minus, int c, int ba, int ia, bit hp);
    return wab(bspl(g, minus, c-2), bspl(g, minus, c-1), bspl(g, minus, c),
               bspl(g, minus, c+1), bspl(g, minus, c+2), ba, ia, hp);
  endfunction

  function automatic real l_on_bspl(int g, bit minus, int c, int ir, bit hp);
    return lr(bspl(g, minus, c-1), bspl(g, minus, c), bspl(g, minus, c+1), ir, hp);
  endfunction

  // x~ of the 10/18 high-pass path: W_a0b0(-z) on v_G with gG = 9.
  function automatic real xt(int n);
    return w_on_bspl(9, 1'b1, n, K_BA0, K_IA0, 1'b1);
  endfunction

  task automatic compare(input string what, input real got, input real exp,
                         input real tol, input int fi, input bit hi, input int m);
    real e = (got > exp) ? got - exp : exp - got;
    checks++;
    if (hi) begin
      if (e > maxerr_hi[fi]) maxerr_hi[fi] = e;
    end else begin
      if (e > maxerr_lo[fi]) maxerr_lo[fi] = e;
    end
    if (e > tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s pair %0d: got %0.1f expected %0.2f", what, m, got, exp);
    end
  endtask

  // ---------------- stimulus ----------------
  int      sent = 0;
  filter_e cur_filter;
  int      since_switch = 0;

  initial begin
    for (int n = 0; n < NS; n++)
      ux[n] = real'($rtoi(1200.0 * $sin(0.05 * n) + 0.0)) +
              real'(int'($urandom_range(0, 1600)) - 800);
    filter_sel = seg_filter[0];
    cur_filter = seg_filter[0];
    in_valid   = 1'b0;
    u          = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (sent < NS) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
        n_gaps++;
      end else begin
        // switch filter bank at the start of a new segment (even sample)
        if (sent % SEG == 0 && sent != 0) begin
          if (seg_filter[sent / SEG] != filter_sel) n_switch++;
          filter_sel = seg_filter[sent / SEG];
        end
        in_valid = 1'b1;
        u        = DATA_W'($rtoi(ux[sent]));
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    finish_test();
  end

  // ---------------- latency check ----------------
  // out_valid must be high exactly one cycle after each odd-indexed sample.
  int  seen = 0;
  logic expect_out = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      if (out_valid !== expect_out) begin
        failures++;
        $display("FAIL out_valid=%0b expected %0b at cycle %0d", out_valid, expect_out, cycles);
      end
      expect_out <= in_valid && (seen % 2 == 1);
      if (in_valid) seen++;
    end
  end

  // ---------------- output check ----------------
  int m = 0;
  int c, c2;
  filter_e f_at_pair;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      // filter in force when this pair was registered
      f_at_pair = cur_filter;
      if (since_switch >= SETTLE && m >= 4) begin
        c  = 2*m - 2;
        c2 = 2*m - 6;
        n_out[f_at_pair]++;
        unique case (f_at_pair)
          FILT_9_7: begin
            checks++; if (y_hg_is_low !== 1'b1) failures++;
            n_lmode++;
            compare("9/7 low",  real'(y_hg), w_on_bspl(4, 1'b0, c, K_BA, K_IA, 1'b0),
                    TOL_LOW, 0, 1'b0, m);
            compare("9/7 high", real'(y_gh), l_on_bspl(4, 1'b1, c, K_IR, 1'b1),
                    TOL_HIGH, 0, 1'b1, m);
          end
          FILT_6_10: begin
            checks++; if (y_hg_is_low !== 1'b0) failures++;
            n_swap++; n_lmode++;
            compare("6/10 low",  real'(y_gh), l_on_bspl(3, 1'b0, c, K_IR, 1'b0),
                    TOL_LOW, 1, 1'b0, m);
            compare("6/10 high", real'(y_hg), w_on_bspl(5, 1'b1, c, K_BA, K_IA, 1'b1),
                    TOL_HIGH, 1, 1'b1, m);
          end
          default: begin
            checks++; if (y_hg_is_low !== 1'b1) failures++;
            n_wmode++; n_casc++;
            compare("10/18 low",  real'(y_hg), w_on_bspl(5, 1'b0, c, K_BA1, K_IA1, 1'b0),
                    TOL_LOW, 2, 1'b0, m);
            compare("10/18 high", real'(y_gh),
                    wab(xt(c2-2), xt(c2-1), xt(c2), xt(c2+1), xt(c2+2), K_BA2, K_IA2, 1'b1),
                    TOL_CASC, 2, 1'b1, m);
          end
        endcase
      end
      m++;
      since_switch++;
      // The next pair starts at input 2m; the stimulus switches on a
      // segment boundary, which always falls on an even sample.
      if ((2*m) % SEG == 0 && seg_filter[((2*m) / SEG) % NSEG] != cur_filter
          && 2*m < NS) begin
        cur_filter   = seg_filter[(2*m) / SEG];
        since_switch = 0;
      end
    end
  end

  task automatic finish_test();
    $display("outputs checked: 9/7=%0d 6/10=%0d 10/18=%0d; switches=%0d gaps=%0d",
             n_out[0], n_out[1], n_out[2], n_switch, n_gaps);
    $display("lp/hp swap=%0d L-mode=%0d W-mode=%0d cascade=%0d",
             n_swap, n_lmode, n_wmode, n_casc);
    for (int i = 0; i < 3; i++)
      $display("max error filter %0d: low %0.2f high %0.2f LSB", i, maxerr_lo[i], maxerr_hi[i]);
    if (n_out[0] == 0 || n_out[1] == 0 || n_out[2] == 0) failures++;
    if (n_switch != NSEG - 1) failures++;
    if (n_gaps == 0) failures++;
    if (n_swap == 0 || n_lmode == 0 || n_wmode == 0 || n_casc == 0) failures++;
    if (m != NS / 2) begin
      failures++;
      $display("FAIL %0d output pairs for %0d samples", m, NS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end
endmodule
