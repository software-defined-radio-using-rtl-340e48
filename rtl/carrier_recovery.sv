// carrier_recovery: the feedback part of the receiver's phase-locked loop.
//
// Chains the decision-directed phase_detector (err = I_hat*Y - Q_hat*X),
// the proportional-integral loop_filter (gains Kp, Ki) and freq_track
// (hold register, gain K in a 4-cycle multiplier, repetition over the 8
// samples of a symbol). The output is the correction that the downconverter
// subtracts from its oscillator's phase increment, closing the loop.
// `rst_loop` clears the loop's state without resetting the rest.
//
// Timing: a symbol's X/Y with `in_vld` changes `adj_out` 2 + 1 + 4 clocks
// later, well inside the 8-clock symbol period. The structure follows the
// design's phase-locked loop diagrams.
module carrier_recovery #(
  parameter int W  = 16,
  parameter int KW = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rst_loop,
  input  logic                 in_vld,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  y_in,
  input  logic signed [KW-1:0] kp,
  input  logic signed [KW-1:0] ki,
  input  logic signed [KW-1:0] k,
  output logic signed [W+1:0]  err,
  output logic signed [31:0]   adj_out
);

  logic                err_vld;
  logic signed [31:0]  v;
  logic                v_vld;

  phase_detector #(.W(W)) u_pd (
    .clk(clk), .rst(rst), .in_vld(in_vld), .x_in(x_in), .y_in(y_in),
    .err(err), .err_vld(err_vld)
  );

  loop_filter #(.EW(W + 2), .KW(KW), .FRAC(31), .OW(32)) u_lf (
    .clk(clk), .rst(rst), .rst_loop(rst_loop), .kp(kp), .ki(ki),
    .err_vld(err_vld), .err(err), .v_out(v), .v_vld(v_vld)
  );

  freq_track #(.VW(32), .KW(KW), .MUL_LAT(4)) u_ft (
    .clk(clk), .rst(rst), .rst_loop(rst_loop), .v_vld(v_vld), .v_in(v),
    .k(k), .adj_out(adj_out)
  );

endmodule
