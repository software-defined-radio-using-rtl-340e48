// tb_downconverter: the nominal frequency is a quarter of the clock rate
// plus a random offset X, and the correction input is X, so the oscillator
// must run at exactly a quarter of the clock rate (cos 32767, 0, -32767, 0;
// sin 0, 32767, 0, -32767). Random received samples r must give
// i = (r*cos) >>> 13 and q = (-r*sin) >>> 13 one clock later. A second part
// removes the correction and checks that the oscillator then drifts.
module tb_downconverter;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [31:0] freq;
  logic signed [31:0] adj;
  logic signed [13:0] r = '0;
  logic signed [15:0] i_o, q_o;
  int checks = 0, failures = 0;

  downconverter dut (.clk, .rst, .freq, .freq_adj(adj), .r_in(r), .i_out(i_o), .q_out(q_o));

  initial begin
    static int ec [4] = '{32767, 0, -32767, 0};
    static int es [4] = '{0, 32767, 0, -32767};
    int x, mism;
    x = $urandom_range(1000, 100000);
    freq = 32'h4000_0000 + 32'(x);
    adj  = 32'(x);
    @(posedge clk); #1 rst = 1'b0;
    @(posedge clk); #1;
    for (int n = 0; n < 2000; n++) begin
      longint rv, ei, eq;
      rv = longint'($urandom_range(0, 16383)) - 8192;
      r = 14'(rv);
      ei = (rv * ec[n % 4]) >>> 13;
      eq = (-rv * es[n % 4]) >>> 13;
      @(posedge clk); #1;
      checks += 2;
      if (longint'(i_o) != ei) begin failures++; if (failures < 10) $display("FAIL: n=%0d i=%0d want %0d", n, i_o, ei); end
      if (longint'(q_o) != eq) begin failures++; if (failures < 10) $display("FAIL: n=%0d q=%0d want %0d", n, q_o, eq); end
    end
    // without the correction the oscillator runs X faster and leaves the
    // quarter-rate pattern
    adj = 0; r = 14'sd8191; mism = 0;
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk); #1;
      if (i_o != 16'((64'sd8191 * ec[(n + 3) % 4]) >>> 13) &&
          i_o != 16'((64'sd8191 * ec[(n + 0) % 4]) >>> 13) &&
          i_o != 16'((64'sd8191 * ec[(n + 1) % 4]) >>> 13) &&
          i_o != 16'((64'sd8191 * ec[(n + 2) % 4]) >>> 13)) mism++;
    end
    checks++;
    if (mism == 0) begin failures++; $display("FAIL: correction input has no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
