// tb_bs_chain -- checks the low-pass (5 x (1+z^-1)/2, taps 4/3/5) and
// high-pass (9 x (1-z^-1)/2, taps 4/5/9) B-spline chains. A random stream
// u[n] is fed as polyphase pairs (u[2m], u[2m-1]); for each filter setting
// the chain outputs must equal the binomial sum
//     v[n] = 2^-g sum_k C(g,k) (+/-1)^k u[n-k]
// at n = 2m and n = 2m-1, within g LSB (each halving stage truncates).
module tb_bs_chain;
  import bs_dwt_pkg::*;
  localparam int DATA_W = 16;
  localparam int NP     = 1500;     // pairs

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  filter_e filter_sel = FILT_9_7;
  logic signed [DATA_W-1:0] a = '0, b = '0;
  logic signed [DATA_W-1:0] he, ho, ge, go;

  bs_chain #(.DATA_W(DATA_W), .N_STAGES(5), .MINUS(1'b0),
             .TAP_9_7(4), .TAP_6_10(3), .TAP_10_18(5)) dut_h (
    .clk (clk), .rst_n (rst_n), .en (en), .filter_sel (filter_sel),
    .a (a), .b (b), .x_e (he), .x_o (ho));
  bs_chain #(.DATA_W(DATA_W), .N_STAGES(9), .MINUS(1'b1),
             .TAP_9_7(4), .TAP_6_10(5), .TAP_10_18(9)) dut_g (
    .clk (clk), .rst_n (rst_n), .en (en), .filter_sel (filter_sel),
    .a (a), .b (b), .x_e (ge), .x_o (go));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real u [2*NP];
  int  per_filter [3];

  function automatic real getu(int n);
    return (n < 0) ? 0.0 : u[n];
  endfunction

  function automatic real binom(int n, int k);
    real r = 1.0;
    for (int i = 1; i <= k; i++) r = r * real'(n - k + i) / real'(i);
    return r;
  endfunction

  function automatic real bspl(int g, bit minus, int n);
    real s = 0.0;
    for (int k = 0; k <= g; k++)
      s += ((minus && (k % 2 == 1)) ? -1.0 : 1.0) * binom(g, k) * getu(n - k);
    return s / real'(1 << g);
  endfunction

  task automatic expect_near(string what, real got, real exp, real tol);
    real e = (got > exp) ? got - exp : exp - got;
    checks++;
    if (e > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0.1f expected %0.2f", what, got, exp);
    end
  endtask

  int gh, gg;
  initial begin
    for (int n = 0; n < 2*NP; n++) u[n] = real'(int'($urandom_range(0, 40000)) - 20000);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NP; m++) begin
      @(negedge clk);
      filter_sel = filter_e'((m / 100) % 3);
      per_filter[filter_sel]++;
      en = 1'b1;
      a  = DATA_W'($rtoi(getu(2*m)));
      b  = DATA_W'($rtoi(getu(2*m - 1)));
      #1;
      unique case (filter_sel)
        FILT_9_7:   begin gh = 4; gg = 4; end
        FILT_6_10:  begin gh = 3; gg = 5; end
        default:    begin gh = 5; gg = 9; end
      endcase
      expect_near("H even", real'(he), bspl(gh, 1'b0, 2*m),     real'(gh));
      expect_near("H odd",  real'(ho), bspl(gh, 1'b0, 2*m - 1), real'(gh));
      expect_near("G even", real'(ge), bspl(gg, 1'b1, 2*m),     real'(gg));
      expect_near("G odd",  real'(go), bspl(gg, 1'b1, 2*m - 1), real'(gg));
      @(posedge clk);
      // a cycle without enable must not disturb the state
      @(negedge clk);
      en = 1'b0;
    end
    if (per_filter[0] == 0 || per_filter[1] == 0 || per_filter[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * NP) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
