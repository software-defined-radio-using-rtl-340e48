// tdm_2to8: time-division demultiplexer from 2-bit symbols back to bytes.
//
// Collects four consecutive symbols, the first as the most significant pair
// (the order used by tdm_8to2), and presents the byte with a one-clock
// `byte_vld` pulse after the fourth. The grouping counter starts after
// reset; which received symbols form a byte is set by the delay compensator
// in front of this block.
//
// Timing: `byte_out` is registered; `byte_vld` pulses one clock after the
// `in_vld` of a group's last symbol. Combining four symbols into a byte
// follows the design.
module tdm_2to8
  import qpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_vld,
  input  sym_t       sym_in,
  output logic [7:0] byte_out,
  output logic       byte_vld
);

  logic [1:0] slot;
  logic [5:0] part;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot     <= '0;
      part     <= '0;
      byte_out <= '0;
      byte_vld <= 1'b0;
    end else begin
      byte_vld <= 1'b0;
      if (in_vld) begin
        slot <= slot + 1'b1;
        if (slot == 2'd3) begin
          byte_out <= {part, sym_in};
          byte_vld <= 1'b1;
        end else begin
          part <= {part[3:0], sym_in};
        end
      end
    end
  end

endmodule
