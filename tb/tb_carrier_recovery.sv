// tb_carrier_recovery: the loop closed around a behavioural base-band
// channel. Random QPSK corners of amplitude 13770 per axis are rotated by
// a phase theta that moves every symbol by -8 * 2*pi * (F - adj) / 2^32,
// F = 42950 being the frequency offset and adj the block's output (the
// downconverter's subtraction). With Kp, Ki from the PI formulas at 1 kHz
// and a 6.25 MHz symbol rate and K = -3102, the loop must pull in: adj
// averages to F and the residual phase error becomes small. The response
// latency (adj changes 7 clocks after in_vld) is checked as well. On every
// symbol the phase error and the settled correction are also compared with
// a bit-exact integer model of detector, PI filter and gain stage.
module tb_carrier_recovery;
  logic clk = 1'b0, rst = 1'b1, rl = 1'b0;
  always #5 clk = ~clk;
  logic vin = 1'b0;
  logic signed [15:0] x = '0, y = '0;
  logic signed [31:0] kp, ki, k, adj;
  logic signed [17:0] err;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam int  F  = 42950;

  function automatic longint sat32(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  carrier_recovery dut (.clk, .rst, .rst_loop(rl), .in_vld(vin), .x_in(x), .y_in(y),
    .kp, .ki, .k, .err, .adj_out(adj));

  initial begin
    real th, den, theta, sum_adj, sum_abs_ph;
    int  n_avg, lat, first_change;
    longint m_int, m_err, m_v, m_adj;
    th  = 2.0 * PI * 1000.0 / 6.25e6;
    den = 1.0 + $sqrt(2.0) * th + th * th;
    kp  = 32'($rtoi(2.0 * $sqrt(2.0) * th / den * 2.0 ** 31));
    ki  = 32'($rtoi(4.0 * th * th / den * 2.0 ** 31));
    k   = -32'sd3102;
    theta = 0.3;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    sum_adj = 0.0; sum_abs_ph = 0.0; n_avg = 0; first_change = -1;
    m_int = 0;
    for (int n = 0; n < 12000; n++) begin
      real a, ph;
      int corner;
      corner = $urandom_range(0, 3);
      a = theta + PI / 4.0 + real'(corner) * PI / 2.0;
      x = 16'($rtoi(13770.0 * $sqrt(2.0) * $cos(a)));
      y = 16'($rtoi(13770.0 * $sqrt(2.0) * $sin(a)));
      vin = 1'b1;
      // model: err = sign(X)*Y - sign(Y)*X, PI in Q.31 -> Q.15, times K >>> 15
      m_err = (x < 0 ? -longint'(y) : longint'(y)) - (y < 0 ? -longint'(x) : longint'(x));
      m_int = m_int + m_err * longint'(ki);
      m_v   = sat32((m_int + m_err * longint'(kp)) >>> 16);
      m_adj = sat32((m_v * longint'(k)) >>> 15);
      @(posedge clk); #1 vin = 1'b0;
      if (n == 0) begin
        lat = 1;
        while (adj == 0 && lat < 20) begin @(posedge clk); #1 lat++; end
        checks++;
        if (lat != 7) begin failures++; $display("FAIL: first correction after %0d clocks", lat); end
        repeat (7 - lat) @(posedge clk);
        #1;
      end else begin
        repeat (7) @(posedge clk);
        #1;
      end
      checks += 2;
      if (longint'(err) != m_err) begin
        failures++; if (failures < 10) $display("FAIL: n=%0d err %0d want %0d", n, err, m_err);
      end
      if (longint'(adj) != m_adj) begin
        failures++; if (failures < 10) $display("FAIL: n=%0d adj %0d want %0d", n, adj, m_adj);
      end
      // the receive oscillator runs F - adj faster than the carrier
      theta = theta - 8.0 * 2.0 * PI * real'(F - int'(adj)) / (2.0 ** 32);
      // phase relative to the nearest lock point
      ph = theta - (PI / 2.0) * $floor(theta / (PI / 2.0) + 0.5);
      if (n >= 8000) begin
        sum_adj += real'(adj);
        sum_abs_ph += (ph < 0.0 ? -ph : ph);
        n_avg++;
      end
    end
    $display("mean correction %0.1f (offset %0d), mean |phase error| %0.4f rad",
             sum_adj / n_avg, F, sum_abs_ph / n_avg);
    checks++;
    if (sum_adj / n_avg < 0.95 * F || sum_adj / n_avg > 1.05 * F) begin failures++; $display("FAIL: offset not tracked"); end
    checks++;
    if (sum_abs_ph / n_avg > 0.05) begin failures++; $display("FAIL: phase not locked"); end
    // loop reset clears the correction
    rl = 1'b1; repeat (8) @(posedge clk); #1;
    checks++;
    if (adj != 0) begin failures++; $display("FAIL: loop reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
