// tb_polyphase_interp: random symbol amplitudes, one every 8 clocks, into
// the interpolator. The reference is the plain definition: the input
// zero-stuffed by 8 and convolved with all 64 raised-cosine taps, then
// shifted right by 15 and saturated. Every output sample is compared, one
// clock after the clock in which its phase is computed.
module tb_polyphase_interp;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic vin = 1'b0;
  logic signed [31:0] x = '0, y;
  int checks = 0, failures = 0;
  longint up [$];       // zero-stuffed input history, newest first

  polyphase_interp dut (.clk, .rst, .in_vld(vin), .x_in(x), .y_out(y));

  function automatic longint ref_out();
    longint acc = 0;
    for (int j = 0; j < RC_LEN; j++)
      if (j < up.size()) acc += up[j] * longint'(RC_COEF[j]);
    acc = acc >>> 15;
    if (acc > 64'sd2147483647) acc = 64'sd2147483647;
    if (acc < -64'sd2147483648) acc = -64'sd2147483648;
    return acc;
  endfunction

  initial begin
    longint expv;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int m = 0; m < 120; m++) begin
      for (int p = 0; p < SPS; p++) begin
        longint v;
        // symbols mostly +-1/sqrt(2), sometimes full scale to exercise saturation
        if (p == 0) begin
          if (m % 17 == 16) v = (($urandom & 1) != 0) ? 64'sd2147483647 : -64'sd2147483648;
          else v = (($urandom & 1) != 0) ? 64'sd1518500250 : -64'sd1518500250;
          up.push_front(v);
          vin <= 1'b1; x <= 32'(v);
        end else begin
          up.push_front(0);
          vin <= 1'b0;
        end
        if (up.size() > RC_LEN) void'(up.pop_back());
        expv = ref_out();
        @(posedge clk); #1;
        checks++;
        if (longint'(y) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL: m=%0d p=%0d y=%0d want %0d", m, p, y, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
