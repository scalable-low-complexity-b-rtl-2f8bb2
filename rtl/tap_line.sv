// tap_line -- five-register delay line feeding a cascaded distributed
// filter stage.
//
// When a distributed part is a product of two filters, the output x~ of the
// first one is itself a full-rate signal and the second filter needs its
// five-sample window. x~ enters a chain of five registers, shifted on every
// en; after the shift carrying x~[n+2] the outputs are
//     t_p2 = x~[n+2], t_p1 = x~[n+1], t_0 = x~[n], t_m1 = x~[n-1], t_m2 = x~[n-2].
// This is the published register chain. All outputs are register
// outputs, reset to zero.
module tap_line #(
  parameter int DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [DATA_W-1:0] t_p2,
  output logic signed [DATA_W-1:0] t_p1,
  output logic signed [DATA_W-1:0] t_0,
  output logic signed [DATA_W-1:0] t_m1,
  output logic signed [DATA_W-1:0] t_m2
);
  logic signed [DATA_W-1:0] r [5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '{default: '0};
    else if (en) begin
      r[0] <= x_in;
      for (int i = 1; i < 5; i++) r[i] <= r[i-1];
    end
  end

  assign t_p2 = r[0];
  assign t_p1 = r[1];
  assign t_0  = r[2];
  assign t_m1 = r[3];
  assign t_m2 = r[4];
endmodule
