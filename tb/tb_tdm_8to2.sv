// tb_tdm_8to2: checks byte-to-symbol multiplexing. Random bytes are offered
// on each request; each must come out as four symbols, bits 7:6 first, one
// per symbol strobe (every 8 clocks), with `byte_req` on every 4th strobe.
module tb_tdm_8to2;
  import qpsk_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic stb = 1'b0, req, vld;
  logic [7:0] byte_in = '0;
  sym_t sym;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  sym_t exp_q [$];
  int nreq = 0, nstb = 0, last_vld = -100, cyc = 0;

  tdm_8to2 dut (.clk, .rst, .sym_stb(stb), .byte_in, .byte_req(req), .sym_out(sym), .sym_vld(vld));

  always @(posedge clk) cyc++;
  always @(posedge clk) if (!rst) begin
    if (req) begin
      logic [7:0] b;
      nreq++;
      b = byte_in;
      for (int s = 3; s >= 0; s--) exp_q.push_back(sym_t'(b >> (2 * s)));
      byte_in <= 8'($urandom);
    end
    if (vld) begin
      sym_t e;
      checks++;
      e = exp_q.pop_front();
      if (sym !== e) begin failures++; $display("FAIL: symbol %h want %h", sym, e); end
      if (last_vld >= 0 && cyc - last_vld != 8) begin failures++; $display("FAIL: symbol spacing"); end
      checks++;
      last_vld = cyc;
    end
  end

  initial begin
    byte_in = 8'hb4;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (400) begin
      repeat (7) @(posedge clk);
      stb <= 1'b1; nstb++;
      @(posedge clk);
      stb <= 1'b0;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nreq != nstb / 4) begin failures++; $display("FAIL: %0d requests for %0d strobes", nreq, nstb); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
