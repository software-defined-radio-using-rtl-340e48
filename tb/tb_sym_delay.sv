// tb_sym_delay: random symbols with irregular gaps; after each valid pulse
// the output must be the symbol given DELAY = 2 pulses earlier (00 for the
// first two).
module tb_sym_delay;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic vin = 1'b0, vout;
  sym_t din = '0, dout;
  int checks = 0, failures = 0;

  sym_delay dut (.clk, .rst, .in_vld(vin), .sym_in(din), .sym_out(dout), .out_vld(vout));

  initial begin
    sym_t hist [$];
    hist = '{2'b00, 2'b00};
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      sym_t d;
      d = sym_t'($urandom);
      hist.push_back(d);
      din = d; vin = 1'b1;
      @(posedge clk); #1 vin = 1'b0;
      checks++;
      if (dout != hist[0] || !vout) begin failures++; $display("FAIL: n=%0d out=%b want %b", n, dout, hist[0]); end
      void'(hist.pop_front());
      repeat ($urandom_range(0, 9)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
