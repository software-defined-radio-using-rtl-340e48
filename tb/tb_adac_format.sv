// tb_adac_format: signed -> offset binary for the DAC and back for the ADC.
// Zero must map to mid-scale 8192, -8192 to 0 and 8191 to 16383, with one
// clock of latency each way; random values must survive the round trip.
module tb_adac_format;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic signed [13:0] tx = '0, rx;
  logic [13:0] dac, adc = '0;
  int checks = 0, failures = 0;

  adac_format dut (.clk, .rst, .tx_in(tx), .dac_code(dac), .adc_code(adc), .rx_out(rx));

  initial begin
    @(posedge clk); #1;
    checks++;
    if (dac != 14'd8192) begin failures++; $display("FAIL: reset code %0d", dac); end
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      int v, u;
      case (n)
        0: v = 0;
        1: v = -8192;
        2: v = 8191;
        default: v = $urandom_range(0, 16383) - 8192;
      endcase
      u = $urandom_range(0, 16383);
      tx = 14'(v); adc = 14'(u);
      @(posedge clk); #1;
      checks += 2;
      if (int'(dac) != v + 8192) begin failures++; $display("FAIL: dac code %0d for %0d", dac, v); end
      if (int'(rx) != u - 8192) begin failures++; $display("FAIL: rx %0d for code %0d", rx, u); end
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
