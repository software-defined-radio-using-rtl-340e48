// polyphase_interp: polyphase raised-cosine FIR interpolator (up-sampling by L).
//
// The 64-tap raised-cosine pulse of qpsk_pkg is split into L = 8 phases of
// NTAPS/L = 8 taps. A new symbol amplitude arrives with `in_vld` once every
// L clocks and enters an 8-deep history. On each clock the filter produces
// one output sample, phase p = 0..L-1 of the current symbol period:
//     y[mL + p] = (sum_k h[kL + p] * x[m - k]) >>> SHIFT,
// so only 8 multiplications are needed per output instead of 64 on a
// zero-stuffed stream. With SHIFT = 15 the Q1.14 coefficients give a gain of
// one half, which keeps the overshoot of the pulse inside the W-bit range;
// results are saturated to OUT_W bits.
//
// Timing: `in_vld` must pulse every L clocks. Phase 0 of a symbol leaves
// the registered output one clock after its `in_vld`, then one sample per
// clock. The polyphase structure, the tap count and the factor 8 follow the
// design; the scaling and saturation are this implementation's choice.
module polyphase_interp
  import qpsk_pkg::*;
#(
  parameter int L      = 8,
  parameter int NTAPS  = 64,
  parameter int IN_W   = 32,
  parameter int OUT_W  = 32,
  parameter int SHIFT  = 15
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_vld,
  input  logic signed [IN_W-1:0]  x_in,
  output logic signed [OUT_W-1:0] y_out
);

  localparam int K    = NTAPS / L;              // taps per phase
  localparam int PW   = IN_W + COEF_W;          // product width
  localparam int SW   = PW + $clog2(K) + 1;     // sum width
  localparam int PHW  = (L > 1) ? $clog2(L) : 1;

  logic signed [IN_W-1:0] hist [K];
  logic [PHW-1:0]         phase;

  // phase of the sample being computed this clock, and the history it uses
  logic [PHW-1:0]         cur_phase;
  logic signed [IN_W-1:0] cur_hist [K];
  logic signed [SW-1:0]   acc;
  logic signed [SW-1:0]   shifted;

  always_comb begin
    cur_phase = in_vld ? '0 : phase;
    cur_hist[0] = in_vld ? x_in : hist[0];
    for (int k = 1; k < K; k++) cur_hist[k] = in_vld ? hist[k-1] : hist[k];
    acc = '0;
    for (int k = 0; k < K; k++)
      acc += SW'(cur_hist[k] * RC_COEF[k*L + int'(cur_phase)]);
    shifted = acc >>> SHIFT;
  end

  localparam logic signed [SW-1:0] MAXV = SW'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -MAXV - 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      for (int k = 0; k < K; k++) hist[k] <= '0;
      y_out <= '0;
    end else begin
      for (int k = 0; k < K; k++) hist[k] <= cur_hist[k];
      phase <= (cur_phase == PHW'(L - 1)) ? '0 : cur_phase + 1'b1;
      if (shifted > MAXV)      y_out <= MAXV[OUT_W-1:0];
      else if (shifted < MINV) y_out <= MINV[OUT_W-1:0];
      else                     y_out <= shifted[OUT_W-1:0];
    end
  end

endmodule
