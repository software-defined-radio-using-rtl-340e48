// tb_diff_decoder: data symbols are differentially encoded in the testbench
// (e[n] = e[n-1] ^ d[n]) and then inverted in I, Q, both or neither, the
// inversion changing every 200 symbols. Apart from the one symbol at each
// change, the decoder output must be the original data, one clock after
// in_vld.
module tb_diff_decoder;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic vin = 1'b0, vout;
  sym_t din = '0, dout;
  int checks = 0, failures = 0;

  diff_decoder dut (.clk, .rst, .in_vld(vin), .sym_in(din), .sym_out(dout), .out_vld(vout));

  initial begin
    sym_t enc, d, inv;
    enc = '0; inv = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 800; n++) begin
      if (n % 200 == 0) inv = sym_t'(n / 200);
      d = sym_t'($urandom);
      enc = enc ^ d;
      din = enc ^ inv; vin = 1'b1;
      @(posedge clk); #1 vin = 1'b0;
      if (n % 200 != 0) begin
        checks++;
        if (dout != d || !vout) begin failures++; $display("FAIL: n=%0d inv=%b out=%b want %b", n, inv, dout, d); end
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
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
