// freq_track: gain stage between the loop filter and the receive oscillator.
//
// The loop filter output is caught in a register (cleared by the
// carrier-recovery reset) when `v_vld` pulses, multiplied by the run-time
// gain K in a MUL_LAT = 4 stage pipelined multiplier, and scaled by 2^-15
// (the filter output's fraction bits). The product is an oscillator phase
// increment correction. Because the register holds its value for the whole
// symbol, the correction is repeated on all 8 samples of the symbol: this is
// the up-sampling by 8 that lets the correction be subtracted directly from
// the oscillator's increment on every sample.
// K converts loop filter units (phase detector LSBs) into phase increment
// units (2^-32 cycle per sample); its sign must make the loop negative
// feedback given that the downconverter subtracts `adj_out`.
//
// Timing: `adj_out` follows a new `v_in` MUL_LAT + 1 clocks after `v_vld`.
// The register with reset, the 4-cycle multiplier and the hold by 8 follow
// the design's block diagram; the scaling is this implementation's choice.
module freq_track #(
  parameter int VW      = 32,
  parameter int KW      = 32,
  parameter int MUL_LAT = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rst_loop,
  input  logic                 v_vld,
  input  logic signed [VW-1:0] v_in,
  input  logic signed [KW-1:0] k,
  output logic signed [31:0]   adj_out
);

  localparam int PW = VW + KW;

  logic signed [VW-1:0] v_hold;
  logic signed [PW-1:0] pipe [MUL_LAT];
  logic signed [PW-1:0] scaled;

  always_ff @(posedge clk) begin
    if (rst || rst_loop) v_hold <= '0;
    else if (v_vld)      v_hold <= v_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < MUL_LAT; s++) pipe[s] <= '0;
    end else begin
      pipe[0] <= v_hold * k;
      for (int s = 1; s < MUL_LAT; s++) pipe[s] <= pipe[s-1];
    end
  end

  localparam logic signed [PW-1:0] MAXV = PW'(64'sh7fff_ffff);
  localparam logic signed [PW-1:0] MINV = -MAXV - 1;

  always_comb begin
    scaled = pipe[MUL_LAT-1] >>> 15;
    if (scaled > MAXV)      adj_out = 32'sh7fff_ffff;
    else if (scaled < MINV) adj_out = -32'sh7fff_ffff - 1;
    else                    adj_out = scaled[31:0];
  end

endmodule
