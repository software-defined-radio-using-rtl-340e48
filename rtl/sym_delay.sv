// sym_delay: system delay compensator in front of the 2-to-8 demultiplexer.
//
// Delays the decoded symbol stream by DELAY symbol periods (a shift register
// clocked by the symbol valid pulses), so that the groups of four symbols
// the demultiplexer combines line up with the bytes of the transmitter. The
// right value depends on the latency of the whole transmit/receive chain.
//
// Timing: `sym_out` changes and `out_vld` pulses one clock after `in_vld`;
// the symbol shown is the one received DELAY valid pulses earlier (zero
// after reset). The default of 2 symbols is the design's value.
module sym_delay
  import qpsk_pkg::*;
#(
  parameter int DELAY = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic in_vld,
  input  sym_t sym_in,
  output sym_t sym_out,
  output logic out_vld
);

  sym_t sr [DELAY+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= DELAY; i++) sr[i] <= '0;
      out_vld <= 1'b0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) begin
        sr[0] <= sym_in;
        for (int i = 1; i <= DELAY; i++) sr[i] <= sr[i-1];
      end
    end
  end

  assign sym_out = sr[DELAY];

endmodule
