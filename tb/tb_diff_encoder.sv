// tb_diff_encoder: random symbols through the encoder; each output must be
// the previous output XOR the input (starting from 00), and decoding the
// output with x[n] ^ x[n-1] must give the input back even when the I bit,
// the Q bit or both are inverted on the way.
module tb_diff_encoder;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic vin = 1'b0, vout;
  sym_t din = '0, dout;
  int checks = 0, failures = 0;

  diff_encoder dut (.clk, .rst, .in_vld(vin), .sym_in(din), .sym_out(dout), .out_vld(vout));

  initial begin
    static sym_t model = '0;
    sym_t prev_rx [4], d;
    for (int k = 0; k < 4; k++) prev_rx[k] = sym_t'(k);   // k = inversion mask
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk);
      d = sym_t'($urandom);
      vin <= 1'b1; din <= d;
      @(posedge clk);
      vin <= 1'b0;
      #1;
      model = model ^ d;
      checks++;
      if (dout !== model || !vout) begin failures++; $display("FAIL: n=%0d out %b want %b", n, dout, model); end
      for (int k = 0; k < 4; k++) begin
        sym_t rx;
        rx = dout ^ sym_t'(k);
        checks++;
        if ((rx ^ prev_rx[k]) !== d) begin failures++; $display("FAIL: inversion %0d not removed", k); end
        prev_rx[k] = rx;
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      checks++;
      if (dout !== model) begin failures++; $display("FAIL: output not held"); end
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
