// adac_format: number-format conversion at the data converters.
//
// The 14-bit DAC and ADC work with unsigned (offset-binary) codes, where
// mid-scale 2^(W-1) means zero, while the signal path is two's complement.
// Transmit side: signed sample -> unsigned DAC code. Receive side: unsigned
// ADC code -> signed sample. Both conversions are an inversion of the MSB,
// i.e. adding or removing the offset of 2^(W-1).
//
// Timing: both directions are registered, one clock each; reset drives the
// DAC to mid-scale and the receive output to zero.
// That the converters use unsigned codes and need this conversion follows
// the design; offset binary as the code is this implementation's choice.
module adac_format #(
  parameter int W = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] tx_in,
  output logic [W-1:0]        dac_code,
  input  logic [W-1:0]        adc_code,
  output logic signed [W-1:0] rx_out
);

  localparam logic [W-1:0] OFFSET = W'(1) << (W - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_code <= OFFSET;
      rx_out   <= '0;
    end else begin
      dac_code <= tx_in ^ OFFSET;
      rx_out   <= adc_code ^ OFFSET;
    end
  end

endmodule
