// bs_stage -- one polyphase B-spline stage, (1+z^-1)/2 or (1-z^-1)/2.
//
// The stage works on polyphase pairs: the input pair is (a, b) =
// (v[2m], v[2m-1]) and the output pair (y_e, y_o) = (w[2m], w[2m-1]) with
// w = (1 +/- z^-1)/2 v. Written out:
//     y_e = (v[2m]   +/- v[2m-1]) / 2 = (a +/- b) / 2
//     y_o = (v[2m-1] +/- v[2m-2]) / 2 = (b +/- a_d) / 2
// where a_d is a delayed by one pair (the stage's only register, loaded on
// en). The structure (two adders, one z^-1 on the upper input, halving on
// the outputs) follows the published B-spline basic block; the halving
// is an arithmetic shift right that drops the LSB (floor), which is this
// implementation's choice. Outputs are combinational from the inputs, so a
// chain of stages is one combinational path with one register per stage.
// The sum is formed one bit wider, so the halved result always fits DATA_W.
module bs_stage #(
  parameter int DATA_W = 16,
  parameter bit MINUS  = 1'b0      // 0: (1+z^-1)/2, 1: (1-z^-1)/2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] a,     // v[2m]
  input  logic signed [DATA_W-1:0] b,     // v[2m-1]
  output logic signed [DATA_W-1:0] y_e,   // w[2m]
  output logic signed [DATA_W-1:0] y_o    // w[2m-1]
);
  logic signed [DATA_W-1:0] a_d;
  logic signed [DATA_W:0]   sum_e, sum_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  a_d <= '0;
    else if (en) a_d <= a;
  end

  always_comb begin
    if (MINUS) begin
      sum_e = a - b;
      sum_o = b - a_d;
    end else begin
      sum_e = a + b;
      sum_o = b + a_d;
    end
  end

  assign y_e = DATA_W'(sum_e >>> 1);
  assign y_o = DATA_W'(sum_o >>> 1);
endmodule
