// tb_qpsk_mapper: all four symbols; I from the MSB and Q from the LSB,
// logic 0 = +1/sqrt(2) = 1518500250 and logic 1 = -1518500250 in Fix_32_31,
// one clock after the input.
module tb_qpsk_mapper;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  sym_t s = '0;
  logic signed [31:0] i_o, q_o;
  int checks = 0, failures = 0;
  localparam longint A = 1518500250;   // round(2^31 * 0.70710678)

  qpsk_mapper dut (.clk, .rst, .sym_in(s), .i_out(i_o), .q_out(q_o));

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int r = 0; r < 20; r++) begin
      sym_t v;
      v = sym_t'($urandom);
      @(posedge clk); s <= v;
      @(posedge clk); #1;
      checks += 2;
      if (longint'(i_o) != (v[1] ? -A : A)) begin failures++; $display("FAIL: I for %b = %0d", v, i_o); end
      if (longint'(q_o) != (v[0] ? -A : A)) begin failures++; $display("FAIL: Q for %b = %0d", v, q_o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
