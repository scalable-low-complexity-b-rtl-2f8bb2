// tb_bs_stage -- checks both polyphase B-spline stages, (1+z^-1)/2 and
// (1-z^-1)/2, against the definition w[n] = floor((v[n] +/- v[n-1]) / 2)
// evaluated on the interleaved sample stream, with random inputs including
// the extreme values, random enable gaps and a reset in the middle.
module tb_bs_stage;
  localparam int DATA_W = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [DATA_W-1:0] a = '0, b = '0;
  logic signed [DATA_W-1:0] pe, po, me, mo;

  bs_stage #(.DATA_W(DATA_W), .MINUS(1'b0)) dut_p (
    .clk (clk), .rst_n (rst_n), .en (en), .a (a), .b (b), .y_e (pe), .y_o (po));
  bs_stage #(.DATA_W(DATA_W), .MINUS(1'b1)) dut_m (
    .clk (clk), .rst_n (rst_n), .en (en), .a (a), .b (b), .y_e (me), .y_o (mo));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int v_prev2 = 0;   // v[2m-2], the even sample of the previous pair

  function automatic int fl2(int x);
    return int'($floor(real'(x) / 2.0));
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int rnd();
    unique case ($urandom_range(0, 5))
      0: return -32768;
      1: return 32767;
      default: return int'($urandom_range(0, 65535)) - 32768;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i == 1000) begin
        rst_n = 1'b0; #1; rst_n = 1'b1; v_prev2 = 0;
      end
      en = ($urandom_range(0, 3) != 0);
      a  = DATA_W'(rnd());
      b  = DATA_W'(rnd());
      #1;
      // v[2m] = a, v[2m-1] = b, v[2m-2] = v_prev2
      expect_eq("plus even",  pe, fl2(int'(a) + int'(b)));
      expect_eq("plus odd",   po, fl2(int'(b) + v_prev2));
      expect_eq("minus even", me, fl2(int'(a) - int'(b)));
      expect_eq("minus odd",  mo, fl2(int'(b) - v_prev2));
      @(posedge clk);
      if (en) v_prev2 = int'(a);
    end
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
