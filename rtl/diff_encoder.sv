// diff_encoder: differential encoder for the 2-bit symbol stream.
//
// The encoder is a discrete-time integrator taken bit-wise modulo 2: each
// output symbol is the previous output XOR the new data symbol,
//     e[n] = e[n-1] ^ d[n].
// The receiver's differentiator d[n] = e[n] ^ e[n-1] undoes it, and because
// it only looks at changes between symbols, an inversion of the I bit, the
// Q bit or both in the channel (the phase ambiguity left by the carrier
// loop) cancels out.
//
// Interface: `sym_in` is taken on `in_vld`; `sym_out` holds the encoded symbol
// from the next clock, with a one-clock `out_vld` pulse. The integrator
// starts from 00 after reset.
//
// The integrator form is from the design; making it modulo 2 per bit matches
// the register-and-XOR decoder of the design's receiver.
module diff_encoder
  import qpsk_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_vld,
  input  sym_t sym_in,
  output sym_t sym_out,
  output logic out_vld
);

  always_ff @(posedge clk) begin
    if (rst) begin
      sym_out <= '0;
      out_vld <= 1'b0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) sym_out <= sym_out ^ sym_in;
    end
  end

endmodule
