// tb_poly_split -- checks the polyphase splitter: with random valid gaps,
// pair_en must rise exactly on even-indexed samples with even_o = u[2m] and
// odd_o = u[2m-1] (zero before the first sample), and out_en exactly on
// odd-indexed samples.
module tb_poly_split;
  localparam int DATA_W = 16;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] u = '0;
  logic pair_en, out_en, odd_phase;
  logic signed [DATA_W-1:0] ev, od;

  poly_split #(.DATA_W(DATA_W)) dut (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .u (u),
    .pair_en (pair_en), .out_en (out_en), .odd_phase_o (odd_phase),
    .even_o (ev), .odd_o (od));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int idx = 0;          // index of the next valid sample
  int last = 0;         // value of the last valid sample
  int npairs = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (idx %0d)", what, got, exp, idx);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      u        = DATA_W'($urandom_range(0, 65535));
      #1;
      expect_eq("pair_en", int'(pair_en), int'(in_valid && (idx % 2 == 0)));
      expect_eq("out_en",  int'(out_en),  int'(in_valid && (idx % 2 == 1)));
      expect_eq("odd_phase", int'(odd_phase), idx % 2);
      if (pair_en) begin
        npairs++;
        expect_eq("even_o", int'(ev), int'(u));
        expect_eq("odd_o",  int'(od), (idx == 0) ? 0 : last);
      end
      @(posedge clk);
      if (in_valid) begin
        last = int'(u);
        idx++;
      end
    end
    if (npairs < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
