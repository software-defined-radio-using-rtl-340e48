// tb_symbol_slicer: random X/Y; the symbol must be {X >= 0, Y >= 0} (the
// inverted sign bits, I high, Q low) one clock after in_vld, and must hold
// between valid pulses.
module tb_symbol_slicer;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic vin = 1'b0, vout;
  logic signed [15:0] x = '0, y = '0;
  sym_t s;
  int checks = 0, failures = 0;

  symbol_slicer dut (.clk, .rst, .in_vld(vin), .x_in(x), .y_in(y), .sym_out(s), .out_vld(vout));

  initial begin
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      int xv, yv;
      sym_t e;
      xv = (n % 10 == 0) ? 0 : $urandom_range(0, 65535) - 32768;
      yv = (n % 10 == 1) ? -1 : $urandom_range(0, 65535) - 32768;
      e = {xv >= 0, yv >= 0};
      x = 16'(xv); y = 16'(yv); vin = 1'b1;
      @(posedge clk); #1 vin = 1'b0;
      checks++;
      if (s != e || !vout) begin failures++; $display("FAIL: x=%0d y=%0d sym=%b", xv, yv, s); end
      x = ~x; y = ~y;
      @(posedge clk); #1;
      checks++;
      if (s != e || vout) begin failures++; $display("FAIL: symbol not held"); end
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
