// downconverter: quadrature demodulator of the receiver.
//
// An nco runs at `freq - freq_adj`: `freq` is the nominal down-conversion
// frequency word and `freq_adj` the correction from the carrier-recovery
// loop, subtracted from the oscillator's phase increment on every sample.
// The received sample r (signed, IN_W-1 fraction bits) is multiplied by the
// oscillator's cosine and negated sine:
//     i_out = r * cos(phi),   q_out = -r * sin(phi),
// rescaled to signed OUT_W-bit numbers with OUT_W-1 fraction bits. With a
// pass-band signal I cos - Q sin this yields I/2 and Q/2 at base band (plus
// a component at twice the carrier that the decimating filter removes).
//
// Timing: one sample per clock, outputs registered. The mixer structure and
// the subtracted correction follow the design; widths are this
// implementation's choice.
module downconverter #(
  parameter int IN_W  = 14,
  parameter int OUT_W = 16,
  parameter int AMP_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [31:0]             freq,
  input  logic signed [31:0]      freq_adj,
  input  logic signed [IN_W-1:0]  r_in,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);

  localparam int PW    = IN_W + AMP_W;
  localparam int SHIFT = (IN_W - 1) + (AMP_W - 1) - (OUT_W - 1);

  logic [31:0]             inc;
  logic signed [AMP_W-1:0] c, s;
  logic signed [PW-1:0]    pi_, pq_;

  assign inc = freq - freq_adj;

  nco #(.ACC_W(32), .AMP_W(AMP_W)) u_nco (
    .clk(clk), .rst(rst), .inc(inc), .cos_out(c), .sin_out(s)
  );

  always_comb begin
    pi_ = PW'(r_in * c);
    pq_ = -PW'(r_in * s);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= OUT_W'(pi_ >>> SHIFT);
      q_out <= OUT_W'(pq_ >>> SHIFT);
    end
  end

endmodule
