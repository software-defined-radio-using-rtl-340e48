// qpsk_mapper: maps a 2-bit symbol onto the QPSK constellation.
//
// The symbol's MSB drives the I channel and its LSB the Q channel. Logic 0
// becomes +1/sqrt(2) and logic 1 becomes -1/sqrt(2), in signed fixed point
// with W-1 fraction bits (Fix_32_31 at the default W = 32), so the four
// points lie at 45, 135, 225 and 315 degrees on the unit circle.
// Registered: outputs follow `sym_in` one clock later.
//
// Mapping and number format follow the design; the register is this
// implementation's choice.
module qpsk_mapper
  import qpsk_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  sym_t                sym_in,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);

  // round(2^(W-1) / sqrt(2))
  localparam logic signed [W-1:0] AMP = W'($rtoi(2.0 ** (W - 1) * 0.7071067811865476 + 0.5));

  function automatic logic signed [W-1:0] level(input logic b);
    return b ? -AMP : AMP;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out <= AMP;
      q_out <= AMP;
    end else begin
      i_out <= level(sym_in[1]);
      q_out <= level(sym_in[0]);
    end
  end

endmodule
