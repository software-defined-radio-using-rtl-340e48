// tb_nco: the oscillator at a quarter of the clock rate (increment 2^30)
// must give cos = 32767, 0, -32767, 0 and sin = 0, 32767, 0, -32767
// repeating; at random increments the outputs must match
// round(32767 * cos/sin(2*pi*phase)) of the 10-bit truncated phase, one
// clock after the phase.
module tb_nco;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [31:0] inc = 32'h4000_0000;
  logic signed [15:0] c, s;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  nco dut (.clk, .rst, .inc, .cos_out(c), .sin_out(s));

  function automatic int q(input real v);
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  initial begin
    static int ec [4] = '{32767, 0, -32767, 0};
    static int es [4] = '{0, 32767, 0, -32767};
    logic [31:0] ph;
    @(posedge clk); #1 rst = 1'b0;
    // after reset the accumulator is 0; the first edge puts out phase 0
    for (int n = 0; n < 16; n++) begin
      @(posedge clk); #1;
      checks += 2;
      if (int'(c) != ec[n % 4]) begin failures++; $display("FAIL: n=%0d cos %0d", n, c); end
      if (int'(s) != es[n % 4]) begin failures++; $display("FAIL: n=%0d sin %0d", n, s); end
    end
    // random increments: predict from the accumulator model
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    ph = 0;
    for (int n = 0; n < 2000; n++) begin
      real a;
      logic [31:0] i2;
      i2 = $urandom;
      inc = i2;
      a = 2.0 * PI * real'(ph >> 22) / 1024.0;
      @(posedge clk); #1;
      checks += 2;
      if (int'(c) != q(32767.0 * $cos(a))) begin failures++; if (failures < 10) $display("FAIL: cos %0d want %0d", c, q(32767.0 * $cos(a))); end
      if (int'(s) != q(32767.0 * $sin(a))) begin failures++; if (failures < 10) $display("FAIL: sin %0d want %0d", s, q(32767.0 * $sin(a))); end
      ph = ph + i2;
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
