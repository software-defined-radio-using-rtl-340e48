// phase_detector: decision-directed phase error of the carrier loop.
//
// For each decimated symbol (X, Y) the hard decisions I_hat = sign(X) and
// Q_hat = sign(Y), each +1 or -1, are formed and the error
//     err = I_hat * Y - Q_hat * X
// is computed. For a point near the constellation corner (a, a) rotated by
// a small angle d this is about 2a*sin(d): zero when the constellation is
// aligned with the axes' diagonals, positive when it has turned
// counter-clockwise. The normalisation by the magnitudes is left out; the
// loop's gain K absorbs the signal amplitude.
//
// Timing: `err` is registered with a one-clock `err_vld` pulse after each
// `in_vld`. The error formula follows the design; dropping the
// normalisation follows its block diagrams.
module phase_detector #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_vld,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic signed [W+1:0] err,
  output logic                err_vld
);

  logic signed [W+1:0] iy, qx;

  always_comb begin
    // multiplication by the +-1 decisions
    iy = x_in[W-1] ? -(W+2)'(y_in) : (W+2)'(y_in);
    qx = y_in[W-1] ? -(W+2)'(x_in) : (W+2)'(x_in);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      err     <= '0;
      err_vld <= 1'b0;
    end else begin
      err_vld <= in_vld;
      if (in_vld) err <= iy - qx;
    end
  end

endmodule
