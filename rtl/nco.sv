// nco: numerically controlled oscillator (direct digital synthesizer).
//
// An ACC_W-bit phase accumulator advances by `inc` every clock; its top
// LUT_AW bits address a 2^LUT_AW-entry sine table, and the cosine is read
// from the same table a quarter period ahead. Amplitudes are signed AMP_W-bit
// with AMP_W-1 fraction bits (full scale 2^(AMP_W-1) - 1).
// A phase increment of 2^(ACC_W-2) gives a quarter of the clock rate, which
// is the 12.5 MHz carrier at a 50 MHz clock.
//
// Timing: `cos_out`/`sin_out` are registered and belong to the phase held in
// the accumulator at the previous edge; the accumulator starts at 0 after
// reset, so the first outputs are cos 0 = full scale, sin 0 = 0.
//
// The table is computed at start-up from $sin: entry a holds
// round((2^(AMP_W-1) - 1) * sin(2*pi*a / 2^LUT_AW)).
// A phase accumulator with a sine/cosine table follows the design; the
// widths and table depth are this implementation's choice.
module nco #(
  parameter int ACC_W  = 32,
  parameter int LUT_AW = 10,
  parameter int AMP_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [ACC_W-1:0]        inc,
  output logic signed [AMP_W-1:0] cos_out,
  output logic signed [AMP_W-1:0] sin_out
);

  localparam int N = 1 << LUT_AW;

  // round((2^(AMP_W-1) - 1) * sin(2*pi*a/N))
  function automatic int sine_entry(input int a);
    real v;
    v = real'((1 << (AMP_W - 1)) - 1) * $sin(2.0 * 3.14159265358979323846 * real'(a) / real'(N));
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  logic signed [AMP_W-1:0] sine [N];

  initial begin
    for (int a = 0; a < N; a++) sine[a] = AMP_W'(sine_entry(a));
  end

  logic [ACC_W-1:0]  acc;
  logic [LUT_AW-1:0] addr_s, addr_c;

  assign addr_s = acc[ACC_W-1 -: LUT_AW];
  assign addr_c = addr_s + LUT_AW'(N / 4);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      cos_out <= '0;
      sin_out <= '0;
    end else begin
      acc     <= acc + inc;
      cos_out <= sine[addr_c];
      sin_out <= sine[addr_s];
    end
  end

endmodule
