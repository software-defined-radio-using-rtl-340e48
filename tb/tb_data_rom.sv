// tb_data_rom: checks the byte memory and its read counter.
// A 16-byte instance is loaded with random bytes. Before `run` requests give
// zero padding; with `run` the bytes come out in address order one clock
// after each request; after the 16th byte `done` rises and zeros follow.
module tb_data_rom;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic we = 1'b0, run = 1'b0, req = 1'b0, done;
  logic [3:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  data_rom #(.DEPTH(DEPTH)) dut (.clk, .rst, .load_we(we), .load_addr(addr), .load_data(din),
    .run, .byte_req(req), .byte_out(dout), .done);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic request(output logic [7:0] b);
    @(posedge clk); req <= 1'b1;
    @(posedge clk); req <= 1'b0;
    #1 b = dout;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    logic [7:0] b;
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = 8'($urandom_range(1, 255));
      @(posedge clk); we <= 1'b1; addr <= 4'(i); din <= ref_mem[i];
    end
    @(posedge clk); we <= 1'b0;
    rst <= 1'b0;
    request(b); check(b == 8'h00, "padding before run");
    check(!done, "not done before run");
    run <= 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      request(b);
      check(b == ref_mem[i], $sformatf("byte %0d: got %h want %h", i, b, ref_mem[i]));
      check(done == (i == DEPTH - 1), $sformatf("done flag after byte %0d", i));
    end
    repeat (3) begin request(b); check(b == 8'h00 && done, "padding after the last byte"); end
    // no request: output holds
    repeat (5) @(posedge clk);
    check(dout == 8'h00, "output holds without request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
