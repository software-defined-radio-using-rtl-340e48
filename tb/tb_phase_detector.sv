// tb_phase_detector: random (X, Y) pairs; err must equal
// sign(X)*Y - sign(Y)*X (sign of zero taken as +1) one clock after in_vld,
// and must follow sin of the rotation for a rotated constellation corner:
// positive for a counter-clockwise turn, negative for clockwise.
module tb_phase_detector;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic vin = 1'b0, vout;
  logic signed [15:0] x = '0, y = '0;
  logic signed [17:0] err;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  phase_detector dut (.clk, .rst, .in_vld(vin), .x_in(x), .y_in(y), .err, .err_vld(vout));

  initial begin
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      int xv, yv, e;
      xv = (n == 0) ? -32768 : $urandom_range(0, 65535) - 32768;
      yv = (n == 0) ? 32767 : $urandom_range(0, 65535) - 32768;
      e = (xv < 0 ? -yv : yv) - (yv < 0 ? -xv : xv);
      x = 16'(xv); y = 16'(yv); vin = 1'b1;
      @(posedge clk); #1 vin = 1'b0;
      checks += 2;
      if (int'(err) != e) begin failures++; if (failures < 10) $display("FAIL: x=%0d y=%0d err=%0d want %0d", xv, yv, err, e); end
      if (!vout) begin failures++; $display("FAIL: no valid pulse"); end
    end
    // rotated corners: err = 2*A*sin(d) approximately
    for (int c = 0; c < 4; c++) begin
      for (int dd = -20; dd <= 20; dd += 5) begin
        real a, d;
        d = real'(dd) * PI / 180.0;
        a = PI / 4.0 + real'(c) * PI / 2.0 + d;
        x = 16'($rtoi(20000.0 * $cos(a)));
        y = 16'($rtoi(20000.0 * $sin(a)));
        vin = 1'b1;
        @(posedge clk); #1 vin = 1'b0;
        checks++;
        if ((dd > 0 && err <= 0) || (dd < 0 && err >= 0) || (dd == 0 && (err > 2 || err < -2)) ||
            (int'(err) - $rtoi(2.0 * 20000.0 / $sqrt(2.0) * $sin(d)) > 4) ||
            (int'(err) - $rtoi(2.0 * 20000.0 / $sqrt(2.0) * $sin(d)) < -4)) begin
          failures++; $display("FAIL: corner %0d turn %0d deg err=%0d", c, dd, err);
        end
      end
    end
    @(posedge clk); #1;
    checks++;
    if (vout) begin failures++; $display("FAIL: valid without input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
