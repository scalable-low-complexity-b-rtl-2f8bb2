// bs_chain -- cascade of polyphase B-spline stages with a filter-driven tap
// multiplexer.
//
// N_STAGES bs_stage instances are chained; stage k (1-based) outputs the
// polyphase pair of ((1 +/- z^-1)/2)^k applied to the input. The selected
// filter picks how many stages (gamma_H or gamma_G) its B-spline term has:
// TAP_9_7, TAP_6_10 or TAP_10_18. In the scalable DWT the low-pass chain is
// 5 x (1+z^-1)/2 tapped at 4, 3, 5 and the high-pass chain 9 x (1-z^-1)/2
// tapped at 4, 5, 9 (gamma values of the three filter banks). The tap
// multiplexers are the first multiplexer column of the architecture.
// The whole chain is combinational from (a, b) to (x_e, x_o); each stage
// holds one register that advances on en (once per input pair).
module bs_chain
  import bs_dwt_pkg::*;
#(
  parameter int DATA_W    = 16,
  parameter int N_STAGES  = 5,
  parameter bit MINUS     = 1'b0,
  parameter int TAP_9_7   = 4,
  parameter int TAP_6_10  = 3,
  parameter int TAP_10_18 = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  filter_e                  filter_sel,
  input  logic signed [DATA_W-1:0] a,      // v[2m]
  input  logic signed [DATA_W-1:0] b,      // v[2m-1]
  output logic signed [DATA_W-1:0] x_e,    // B-spline output, even sample
  output logic signed [DATA_W-1:0] x_o     // B-spline output, preceding odd sample
);
  // pe[k], po[k]: pair after k stages; index 0 is the chain input.
  logic signed [DATA_W-1:0] pe [N_STAGES+1];
  logic signed [DATA_W-1:0] po [N_STAGES+1];

  assign pe[0] = a;
  assign po[0] = b;

  for (genvar k = 0; k < N_STAGES; k++) begin : g_stage
    bs_stage #(.DATA_W(DATA_W), .MINUS(MINUS)) u_stage (
      .clk (clk), .rst_n (rst_n), .en (en),
      .a   (pe[k]), .b (po[k]),
      .y_e (pe[k+1]), .y_o (po[k+1])
    );
  end

  always_comb begin
    unique case (filter_sel)
      FILT_6_10:  begin x_e = pe[TAP_6_10];  x_o = po[TAP_6_10];  end
      FILT_10_18: begin x_e = pe[TAP_10_18]; x_o = po[TAP_10_18]; end
      default:    begin x_e = pe[TAP_9_7];   x_o = po[TAP_9_7];   end
    endcase
  end
endmodule
