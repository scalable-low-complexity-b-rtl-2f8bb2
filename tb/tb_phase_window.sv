// tb_phase_window -- checks the polyphase-to-window registers. Pairs
// (x_e, x_o) = (v[2m], v[2m-1]) of a random stream v are loaded with random
// enable gaps; after pair m the even window must be v[2m-4 .. 2m] and, with
// sel_odd, the odd window v[2m-5 .. 2m-1] (zero before the start).
module tb_phase_window;
  localparam int DATA_W = 16;
  localparam int NP     = 1000;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, sel_odd = 1'b0;
  logic signed [DATA_W-1:0] x_e = '0, x_o = '0;
  logic signed [DATA_W-1:0] w [5];

  phase_window #(.DATA_W(DATA_W), .ODD_WINDOW(1'b1)) dut (
    .clk (clk), .rst_n (rst_n), .en (en), .sel_odd (sel_odd),
    .x_e (x_e), .x_o (x_o),
    .w_p2 (w[0]), .w_p1 (w[1]), .w_0 (w[2]), .w_m1 (w[3]), .w_m2 (w[4]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int v [2*NP + 2];
  int m = 0;          // pairs loaded so far

  function automatic int getv(int n);
    return (n < 0) ? 0 : v[n];
  endfunction

  initial begin
    for (int n = 0; n < 2*NP + 2; n++) v[n] = int'($urandom_range(0, 65535)) - 32768;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (m < NP) begin
      @(negedge clk);
      en  = ($urandom_range(0, 2) != 0);
      x_e = DATA_W'(getv(2*m));
      x_o = DATA_W'(getv(2*m - 1));
      @(posedge clk);
      if (en) m++;
      @(negedge clk);
      en = 1'b0;
      // last pair loaded is m-1: v[2m-2] newest even sample
      for (int s = 0; s < 2; s++) begin
        sel_odd = s[0];
        #1;
        for (int j = 0; j < 5; j++) begin
          int exp;
          exp = getv(2*(m-1) - j - s);
          checks++;
          if (int'(w[j]) != exp) begin
            failures++;
            if (failures < 10) $display("FAIL pair %0d sel_odd %0d tap %0d: got %0d exp %0d",
                                        m, s, j, w[j], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NP) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
