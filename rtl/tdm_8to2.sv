// tdm_8to2: time-division multiplexer from bytes to 2-bit QPSK symbols.
//
// Each byte is sent as four consecutive symbols, most significant pair first
// (bits 7:6, 5:4, 3:2, 1:0). On every `sym_stb` (one per symbol period) the
// next symbol appears on `sym_out` one clock later with a one-clock
// `sym_vld` pulse. When the first pair of a byte is taken, `byte_req` pulses
// so that the source can prepare the following byte; `byte_in` must be
// stable by the next group's first strobe, four symbols later.
//
// Splitting a pixel into four two-bit symbols follows the design; the order
// of the pairs inside the byte is this implementation's choice.
module tdm_8to2
  import qpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sym_stb,
  input  logic [7:0] byte_in,
  output logic       byte_req,
  output sym_t       sym_out,
  output logic       sym_vld
);

  logic [1:0] slot;
  logic [5:0] rest;

  assign byte_req = sym_stb && (slot == 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      slot    <= '0;
      rest    <= '0;
      sym_out <= '0;
      sym_vld <= 1'b0;
    end else begin
      sym_vld <= sym_stb;
      if (sym_stb) begin
        slot <= slot + 1'b1;
        if (slot == 2'd0) begin
          sym_out <= byte_in[7:6];
          rest    <= byte_in[5:0];
        end else begin
          sym_out <= rest[5:4];
          rest    <= {rest[3:0], 2'b00};
        end
      end
    end
  end

endmodule
