// symbol_slicer: hard decision of a received QPSK symbol.
//
// The decision threshold is zero on both axes, so only the sign bits of the
// decimated X (in-phase) and Y (quadrature) samples are needed. Each sign
// bit is inverted and the two are concatenated, I bit high and Q bit low,
// into the received 2-bit symbol. The inversion turns a positive sample into
// logic 1; relative to the transmit mapping (logic 1 = negative amplitude)
// this is a 180 degree rotation, which the differential decoder that
// follows removes together with the carrier loop's own phase ambiguity.
//
// Timing: registered; `sym_out` and the `out_vld` pulse follow `in_vld` by
// one clock. Slicing, inversion and concatenation follow the design.
module symbol_slicer
  import qpsk_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_vld,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output sym_t                sym_out,
  output logic                out_vld
);

  always_ff @(posedge clk) begin
    if (rst) begin
      sym_out <= '0;
      out_vld <= 1'b0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) sym_out <= {~x_in[W-1], ~y_in[W-1]};
    end
  end

endmodule
