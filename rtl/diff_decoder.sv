// diff_decoder: differential decoder of the received symbol stream.
//
// A register keeps the previous received symbol and the output is the XOR of
// the current and previous symbols (a discrete-time differentiator modulo 2
// per bit): d[n] = e[n] ^ e[n-1]. Any fixed inversion of the I bit, the Q
// bit or both appears in both terms and cancels, so the decoded data do not
// depend on which of the equivalent phases the carrier loop locked to.
//
// Timing: `sym_in` is taken on `in_vld`; `sym_out` is registered with a
// one-clock `out_vld` pulse. The register starts at 00 after reset.
// The register-and-XOR structure follows the design.
module diff_decoder
  import qpsk_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_vld,
  input  sym_t sym_in,
  output sym_t sym_out,
  output logic out_vld
);

  sym_t prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev    <= '0;
      sym_out <= '0;
      out_vld <= 1'b0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) begin
        sym_out <= sym_in ^ prev;
        prev    <= sym_in;
      end
    end
  end

endmodule
