// polyphase_decim: polyphase raised-cosine FIR decimator (down-sampling by M).
//
// Computes every M-th output of the 64-tap raised-cosine filter of qpsk_pkg,
//     y[m] = (sum_{j=0}^{63} h[j] * x[n - j]) >>> SHIFT,  n = mM + M-1,
// without ever computing the discarded outputs. The input stream is dealt
// round-robin into M branches (input phase q = 0..M-1), each with its own
// 8-deep delay line. When a sample of phase q arrives, branch q's 8 taps
// h[8k + M-1-q] are applied to its delay line and the partial sum is added
// to an accumulator; the sample of phase M-1 completes the output. So the
// filter needs 8 multipliers working every clock, one branch per clock.
//
// Interface: one sample per clock on `x_in`; `y_out` is updated with a
// one-clock `y_vld` pulse once every M clocks. PHASE sets which input
// sample after reset counts as phase 0, i.e. the sampling instant of the
// decimator. With SHIFT = 16 and Q1.14 taps the DC gain is about 2.
//
// The polyphase structure, the 64 taps, the factor 8 and the reuse of the
// interpolator's coefficients follow the design; the branch scheduling,
// SHIFT and PHASE are this implementation's choice.
module polyphase_decim
  import qpsk_pkg::*;
#(
  parameter int M      = 8,
  parameter int NTAPS  = 64,
  parameter int IN_W   = 16,
  parameter int OUT_W  = 16,
  parameter int SHIFT  = 16,
  parameter int PHASE  = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  x_in,
  output logic signed [OUT_W-1:0] y_out,
  output logic                    y_vld
);

  localparam int K   = NTAPS / M;
  localparam int PW  = IN_W + COEF_W;
  localparam int SW  = PW + $clog2(NTAPS) + 1;
  localparam int QW  = (M > 1) ? $clog2(M) : 1;

  logic signed [IN_W-1:0] line [M][K];
  logic [QW-1:0]          q;
  logic signed [SW-1:0]   acc;

  logic signed [IN_W-1:0] new_line [K];
  logic signed [SW-1:0]   partial;
  logic signed [SW-1:0]   total;
  logic signed [SW-1:0]   shifted;

  always_comb begin
    new_line[0] = x_in;
    for (int k = 1; k < K; k++) new_line[k] = line[q][k-1];
    partial = '0;
    for (int k = 0; k < K; k++)
      partial += SW'(new_line[k] * RC_COEF[k*M + (M - 1 - int'(q))]);
    total   = acc + partial;
    shifted = total >>> SHIFT;
  end

  localparam logic signed [SW-1:0] MAXV = SW'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -MAXV - 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= QW'(PHASE);
      acc   <= '0;
      y_out <= '0;
      y_vld <= 1'b0;
      for (int b = 0; b < M; b++)
        for (int k = 0; k < K; k++) line[b][k] <= '0;
    end else begin
      for (int k = 0; k < K; k++) line[q][k] <= new_line[k];
      if (q == QW'(M - 1)) begin
        q     <= '0;
        acc   <= '0;
        y_vld <= 1'b1;
        if (shifted > MAXV)      y_out <= MAXV[OUT_W-1:0];
        else if (shifted < MINV) y_out <= MINV[OUT_W-1:0];
        else                     y_out <= shifted[OUT_W-1:0];
      end else begin
        q     <= q + 1'b1;
        acc   <= total;
        y_vld <= 1'b0;
      end
    end
  end

endmodule
