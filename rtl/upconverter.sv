// upconverter: quadrature modulator of the transmitter.
//
// Forms the real pass-band sample
//     s = I * cos(w n) - Q * sin(w n)
// from the interpolated I and Q streams (signed, IN_W-1 fraction bits) and
// the carrier of an internal nco whose phase increment is `carrier_inc`
// (2^30 = a quarter of the clock rate). The result is rescaled to a signed
// OUT_W-bit sample with OUT_W-1 fraction bits for the 14-bit DAC, saturated
// at full scale.
//
// Timing: one sample per clock; s_out is registered and lags i_in/q_in by
// one clock. The modulation equation and the 14-bit output follow the
// design; widths inside and the saturation are this implementation's choice.
module upconverter #(
  parameter int IN_W  = 32,
  parameter int OUT_W = 14,
  parameter int AMP_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [31:0]             carrier_inc,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  output logic signed [OUT_W-1:0] s_out
);

  localparam int PW    = IN_W + AMP_W;
  localparam int SHIFT = (IN_W - 1) + (AMP_W - 1) - (OUT_W - 1);

  logic signed [AMP_W-1:0] c, s;
  logic signed [PW:0]      mix;
  logic signed [PW:0]      scaled;

  nco #(.ACC_W(32), .AMP_W(AMP_W)) u_nco (
    .clk(clk), .rst(rst), .inc(carrier_inc), .cos_out(c), .sin_out(s)
  );

  localparam logic signed [PW:0] MAXV = (PW+1)'((1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [PW:0] MINV = -MAXV - 1;

  always_comb begin
    mix    = (PW+1)'(i_in * c) - (PW+1)'(q_in * s);
    scaled = mix >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst)                 s_out <= '0;
    else if (scaled > MAXV)  s_out <= MAXV[OUT_W-1:0];
    else if (scaled < MINV)  s_out <= MINV[OUT_W-1:0];
    else                     s_out <= scaled[OUT_W-1:0];
  end

endmodule
