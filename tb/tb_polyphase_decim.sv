// tb_polyphase_decim: random samples, one per clock, into the decimator.
// The reference convolves the input with all 64 raised-cosine taps and
// keeps every 8th result (the one ending on input phase 7), shifted right
// by 16 and saturated. An output pulse must come every 8 clocks and carry
// that value.
module tb_polyphase_decim;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic signed [15:0] x = '0, y;
  logic vld;
  int checks = 0, failures = 0;
  longint hist [$];   // newest first
  longint expected [$];
  int n = 0, nsat = 0, last = -1, cyc = 0;

  polyphase_decim dut (.clk, .rst, .x_in(x), .y_out(y), .y_vld(vld));

  always @(posedge clk) cyc++;
  always @(posedge clk) if (vld && !rst) begin
    longint e;
    checks++;
    e = expected.pop_front();
    if (longint'(y) != e) begin failures++; if (failures < 10) $display("FAIL: y=%0d want %0d", y, e); end
    if (last >= 0 && cyc - last != 8) begin failures++; $display("FAIL: output spacing %0d", cyc - last); end
    last = cyc;
  end

  initial begin
    @(posedge clk); #1 rst = 1'b0;
    for (n = 0; n < 2000; n++) begin
      longint v;
      // bursts of a constant full-scale value drive the output into saturation
      if ((n / 64) % 6 == 5) v = 32767;
      else v = longint'($urandom_range(0, 65535)) - 32768;
      x = 16'(v);
      hist.push_front(v);
      if (hist.size() > RC_LEN) void'(hist.pop_back());
      if (n % SPS == SPS - 1) begin
        longint acc;
        acc = 0;
        for (int j = 0; j < hist.size(); j++) acc += hist[j] * longint'(RC_COEF[j]);
        acc = acc >>> 16;
        if (acc > 32767) begin acc = 32767; nsat++; end
        if (acc < -32768) begin acc = -32768; nsat++; end
        expected.push_back(acc);
      end
      @(posedge clk); #1;
    end
    repeat (2) @(posedge clk);
    checks++;
    if (expected.size() != 0 || nsat == 0) begin failures++; $display("FAIL: %0d outputs missing, %0d saturated", expected.size(), nsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
