// tb_tap_line -- checks the five-register delay line: after the k-th
// enabled shift the outputs t_p2 .. t_m2 must be the last five inputs
// x[k-1] .. x[k-5] (zero before the start); cycles without enable hold.
module tb_tap_line;
  localparam int DATA_W = 16;
  localparam int N      = 2000;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [DATA_W-1:0] t [5];

  tap_line #(.DATA_W(DATA_W)) dut (
    .clk (clk), .rst_n (rst_n), .en (en), .x_in (x_in),
    .t_p2 (t[0]), .t_p1 (t[1]), .t_0 (t[2]), .t_m1 (t[3]), .t_m2 (t[4]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int x [N];
  int k = 0;

  initial begin
    for (int n = 0; n < N; n++) x[n] = int'($urandom_range(0, 65535)) - 32768;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (k < N) begin
      @(negedge clk);
      en   = ($urandom_range(0, 2) != 0);
      x_in = DATA_W'(x[k]);
      @(posedge clk);
      if (en) k++;
      #1;
      for (int j = 0; j < 5; j++) begin
        int exp;
        exp = (k - 1 - j < 0) ? 0 : x[k - 1 - j];
        checks++;
        if (int'(t[j]) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL shift %0d tap %0d: got %0d exp %0d", k, j, t[j], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
