// phase_window -- polyphase-to-window registers in front of a distributed
// filter.
//
// The B-spline part delivers polyphase pairs (x_e, x_o) = (v[2m], v[2m-1]),
// while the distributed filter needs the plain five-sample window
// v[n-2..n+2]. Loading x_e into a chain of three registers and x_o into a
// chain of two on every en gives, after pair m, the window centred on the
// even sample n = 2m-2:
//     w_p2 = v[2m] w_p1 = v[2m-1] w_0 = v[2m-2] w_m1 = v[2m-3] w_m2 = v[2m-4]
// This follows the published register arrangement. With ODD_WINDOW set,
// a third register on the x_o chain (this implementation's addition) also
// holds v[2m-5], so that when sel_odd is high the same outputs carry the
// window centred on the odd sample 2m-3. The cascaded 10/18 high-pass path
// needs that window to produce its intermediate signal at full rate.
// All outputs are register outputs (or a multiplexer on them).
module phase_window #(
  parameter int DATA_W     = 16,
  parameter bit ODD_WINDOW = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     sel_odd,
  input  logic signed [DATA_W-1:0] x_e,
  input  logic signed [DATA_W-1:0] x_o,
  output logic signed [DATA_W-1:0] w_p2,
  output logic signed [DATA_W-1:0] w_p1,
  output logic signed [DATA_W-1:0] w_0,
  output logic signed [DATA_W-1:0] w_m1,
  output logic signed [DATA_W-1:0] w_m2
);
  logic signed [DATA_W-1:0] re [3];   // v[2m], v[2m-2], v[2m-4]
  logic signed [DATA_W-1:0] ro [3];   // v[2m-1], v[2m-3], v[2m-5]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re <= '{default: '0};
      ro <= '{default: '0};
    end else if (en) begin
      re[0] <= x_e;
      re[1] <= re[0];
      re[2] <= re[1];
      ro[0] <= x_o;
      ro[1] <= ro[0];
      ro[2] <= ODD_WINDOW ? ro[1] : '0;
    end
  end

  always_comb begin
    if (ODD_WINDOW && sel_odd) begin
      w_p2 = ro[0];
      w_p1 = re[1];
      w_0  = ro[1];
      w_m1 = re[2];
      w_m2 = ro[2];
    end else begin
      w_p2 = re[0];
      w_p1 = ro[0];
      w_0  = re[1];
      w_m1 = ro[1];
      w_m2 = re[2];
    end
  end
endmodule
