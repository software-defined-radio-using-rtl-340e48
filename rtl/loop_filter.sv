// loop_filter: proportional-integral filter of the carrier-recovery loop.
//
// On every phase error sample e (one per symbol):
//     integ <= integ + Ki * e
//     v      = Kp * e + integ        (integ after the update)
// Kp and Ki are run-time inputs in signed Q.FRAC format (FRAC = 31
// fraction bits), meant to be set from the loop bandwidth BW and the symbol
// rate fs with theta = 2*pi*BW/fs:
//     Kp = 2*sqrt(2)*theta / (1 + sqrt(2)*theta + theta^2)
//     Ki = 4*theta^2       / (1 + sqrt(2)*theta + theta^2).
// The output keeps 15 fraction bits (v_out = v >>> (FRAC-15)), saturated to
// OW bits, so small corrections are not lost before the gain K.
// `rst_loop` (the carrier-recovery reset) clears the integrator and output.
//
// Timing: `v_out` is registered, with a one-clock `v_vld` pulse after each
// `err_vld`. The PI structure, the formulas and the reset input follow the
// design; the number formats are this implementation's choice.
module loop_filter #(
  parameter int EW   = 18,
  parameter int KW   = 32,
  parameter int FRAC = 31,
  parameter int OW   = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rst_loop,
  input  logic signed [KW-1:0] kp,
  input  logic signed [KW-1:0] ki,
  input  logic                 err_vld,
  input  logic signed [EW-1:0] err,
  output logic signed [OW-1:0] v_out,
  output logic                 v_vld
);

  localparam int PW = EW + KW;        // product width
  localparam int IW = PW + 8;         // integrator width (headroom)

  logic signed [IW-1:0] integ, integ_next, v_full, v_sh;

  always_comb begin
    integ_next = integ + IW'(err * ki);
    v_full     = integ_next + IW'(err * kp);
    v_sh       = v_full >>> (FRAC - 15);
  end

  localparam logic signed [IW-1:0] MAXV = IW'((64'sd1 <<< (OW - 1)) - 1);
  localparam logic signed [IW-1:0] MINV = -MAXV - 1;

  always_ff @(posedge clk) begin
    if (rst || rst_loop) begin
      integ <= '0;
      v_out <= '0;
      v_vld <= 1'b0;
    end else begin
      v_vld <= err_vld;
      if (err_vld) begin
        integ <= integ_next;
        if (v_sh > MAXV)      v_out <= MAXV[OW-1:0];
        else if (v_sh < MINV) v_out <= MINV[OW-1:0];
        else                  v_out <= v_sh[OW-1:0];
      end
    end
  end

endmodule
