// tb_tdm_2to8: random bytes are cut into four symbols (bits 7:6 first) and
// fed with gaps; after every fourth symbol the byte must come out with a
// one-clock byte_vld, and never otherwise.
module tb_tdm_2to8;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic vin = 1'b0, bv;
  sym_t din = '0;
  logic [7:0] b;
  int checks = 0, failures = 0;

  tdm_2to8 dut (.clk, .rst, .in_vld(vin), .sym_in(din), .byte_out(b), .byte_vld(bv));

  initial begin
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      for (int s = 3; s >= 0; s--) begin
        din = sym_t'(v >> (2 * s)); vin = 1'b1;
        @(posedge clk); #1 vin = 1'b0;
        checks++;
        if (s == 0) begin
          if (!bv || b != v) begin failures++; $display("FAIL: byte %h want %h", b, v); end
        end else if (bv) begin
          failures++; $display("FAIL: early byte_vld");
        end
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
