// tb_upconverter: random I/Q samples at a carrier of a quarter of the
// clock rate, where the oscillator's cos/sin run 32767, 0, -32767, 0 and
// 0, 32767, 0, -32767. Each output must equal
// sat14((I*cos - Q*sin) >>> 33) of the previous clock's inputs.
module tb_upconverter;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic signed [31:0] i_in = '0, q_in = '0;
  logic signed [13:0] s;
  int checks = 0, failures = 0;

  upconverter dut (.clk, .rst, .carrier_inc(32'h4000_0000), .i_in, .q_in, .s_out(s));

  initial begin
    static int ec [4] = '{32767, 0, -32767, 0};
    static int es [4] = '{0, 32767, 0, -32767};
    @(posedge clk); #1 rst = 1'b0;
    @(posedge clk); #1;   // carrier phase 0 is now on the oscillator outputs
    for (int n = 0; n < 2000; n++) begin
      longint iv, qv, m;
      iv = longint'($signed($urandom));
      qv = longint'($signed($urandom));
      i_in = 32'(iv); q_in = 32'(qv);
      m = (iv * ec[n % 4] - qv * es[n % 4]) >>> 33;
      if (m > 8191) m = 8191;
      if (m < -8192) m = -8192;
      @(posedge clk); #1;
      checks++;
      if (longint'(s) != m) begin failures++; if (failures < 10) $display("FAIL: n=%0d s=%0d want %0d", n, s, m); end
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
