// tb_loop_filter: random errors with random Kp, Ki. The model keeps
// integ += Ki*e and v = (Kp*e + integ) >>> 16, saturated to 32 bits, in
// 64-bit arithmetic; v_out must match it one clock after err_vld. A long
// run of large errors checks saturation, and the loop reset must clear
// the integrator.
module tb_loop_filter;
  logic clk = 1'b0, rst = 1'b1, rl = 1'b0;
  always #5 clk = ~clk;
  logic signed [31:0] kp, ki, v;
  logic signed [17:0] e = '0;
  logic ev = 1'b0, vv;
  int checks = 0, failures = 0;

  loop_filter dut (.clk, .rst, .rst_loop(rl), .kp, .ki, .err_vld(ev), .err(e), .v_out(v), .v_vld(vv));

  longint integ = 0;
  int nsat = 0;

  task automatic step(input int ev_in);
    longint vf, ex;
    e = 18'(ev_in); ev = 1'b1;
    integ = integ + longint'(ev_in) * longint'(ki);
    vf = (integ + longint'(ev_in) * longint'(kp)) >>> 16;
    ex = vf;
    if (ex > 64'sd2147483647) begin ex = 64'sd2147483647; nsat++; end
    if (ex < -64'sd2147483648) begin ex = -64'sd2147483648; nsat++; end
    @(posedge clk); #1 ev = 1'b0;
    checks++;
    if (longint'(v) != ex || !vv) begin failures++; if (failures < 10) $display("FAIL: v=%0d want %0d", v, ex); end
    repeat ($urandom_range(0, 7)) @(posedge clk);
    #1;
    checks++;
    if (longint'(v) != ex) begin failures++; $display("FAIL: v not held"); end
  endtask

  initial begin
    kp = 32'sd6097576; ki = 32'sd8669;
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 500; n++) step($urandom_range(0, 20000) - 10000);
    kp = 32'($urandom_range(0, 1 << 30)); ki = 32'($urandom_range(0, 1 << 24));
    for (int n = 0; n < 500; n++) step($urandom_range(0, 200000) - 100000);
    // saturation: large constant error with a large Ki
    ki = 32'sh4000_0000; kp = 0;
    for (int n = 0; n < 300; n++) step(131071);
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: saturation not reached"); end
    // loop reset clears the integrator
    @(posedge clk); #1 rl = 1'b1;
    @(posedge clk); #1 rl = 1'b0;
    integ = 0;
    checks++;
    if (v != 0) begin failures++; $display("FAIL: output not cleared by loop reset"); end
    kp = 32'sd6097576; ki = 32'sd8669;
    for (int n = 0; n < 50; n++) step($urandom_range(0, 20000) - 10000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
