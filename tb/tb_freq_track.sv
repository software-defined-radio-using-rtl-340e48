// tb_freq_track: each new loop-filter value v (with v_vld) must appear as
// (v*K) >>> 15 on adj_out exactly 5 clocks later (hold register plus the
// 4-cycle multiplier) and stay there until the next value, i.e. it is
// repeated over the 8 samples of a symbol. The loop reset clears the hold
// register.
module tb_freq_track;
  logic clk = 1'b0, rst = 1'b1, rl = 1'b0;
  always #5 clk = ~clk;
  logic vv = 1'b0;
  logic signed [31:0] v = '0, k, adj;
  int checks = 0, failures = 0;

  freq_track dut (.clk, .rst, .rst_loop(rl), .v_vld(vv), .v_in(v), .k, .adj_out(adj));

  function automatic longint expect_adj(input longint a, input longint b);
    longint p;
    p = (a * b) >>> 15;
    if (p > 64'sd2147483647) p = 64'sd2147483647;
    if (p < -64'sd2147483648) p = -64'sd2147483648;
    return p;
  endfunction

  initial begin
    longint prev, now;
    k = -32'sd3102;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (6) @(posedge clk);
    #1;
    prev = 0;
    for (int n = 0; n < 300; n++) begin
      int vi;
      vi = (n % 50 == 49) ? 32'sh7fff_0000 : int'($urandom_range(0, 4000000)) - 2000000;
      if (n == 150) begin
        // K is a static setting: change it between symbols and let the
        // multiplier pipeline settle on the held value
        k = 32'($urandom);
        repeat (6) @(posedge clk);
        #1;
        prev = expect_adj(longint'(v), longint'(k));
        checks++;
        if (longint'(adj) != prev) begin failures++; $display("FAIL: new K not applied"); end
      end
      now = expect_adj(longint'(vi), longint'(k));
      v = vi; vv = 1'b1;
      @(posedge clk); #1 vv = 1'b0;
      // clocks 1..4 after the pulse: old value still out; clock 5: new value
      for (int c = 1; c <= 7; c++) begin
        checks++;
        if (c < 5 && longint'(adj) != prev) begin failures++; if (failures < 10) $display("FAIL: n=%0d c=%0d early change %0d", n, c, adj); end
        if (c >= 5 && longint'(adj) != now) begin failures++; if (failures < 10) $display("FAIL: n=%0d c=%0d adj=%0d want %0d", n, c, adj, now); end
        @(posedge clk); #1;
      end
      prev = now;
    end
    rl = 1'b1; @(posedge clk); #1 rl = 1'b0;
    repeat (6) @(posedge clk);
    #1;
    checks++;
    if (adj != 0) begin failures++; $display("FAIL: not cleared by loop reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
