// poly_split -- polyphase input splitter (down-sample by two, with and
// without a one-sample delay, at the input u of the B-spline DWT).
//
// Samples arrive one per clock when in_valid is high; gaps are allowed. The
// first sample after reset has index 0. On every even-indexed sample 2m the
// block presents the polyphase pair
//     even_o = u[2m]      (the current input, combinational)
//     odd_o  = u[2m-1]    (held from the previous valid sample)
// and raises pair_en for that cycle; the B-spline stages advance on pair_en.
// On every odd-indexed sample it raises out_en, which the top uses to
// register its results and to feed the second half-rate step of the
// cascaded 10/18 path. u[-1] is taken as zero after reset.
// odd_phase_o is high while the next valid sample is odd-indexed.
module poly_split #(
  parameter int DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] u,
  output logic                     pair_en,
  output logic                     out_en,
  output logic                     odd_phase_o,
  output logic signed [DATA_W-1:0] even_o,
  output logic signed [DATA_W-1:0] odd_o
);
  logic                     odd_phase;
  logic signed [DATA_W-1:0] u_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_phase <= 1'b0;
      u_prev    <= '0;
    end else if (in_valid) begin
      odd_phase <= ~odd_phase;
      if (odd_phase) u_prev <= u;
    end
  end

  assign pair_en     = in_valid & ~odd_phase;
  assign out_en      = in_valid &  odd_phase;
  assign odd_phase_o = odd_phase;
  assign even_o      = u;
  assign odd_o       = u_prev;
endmodule
