// data_rom: the transmitter's data source, a byte memory read by a counter.
//
// The memory holds the image (or any byte stream) to be sent, DEPTH bytes of
// DATA_W bits; the default of 625 bytes is one colour plane of a 25 x 25
// pixel, 8 bit/pixel image. A load port writes the contents before a
// transmission. Once `run` is high, every `byte_req` pulse (one per four
// symbols, from the 8-to-2 multiplexer) presents the next byte on `byte_out`
// one clock later. After the last byte the counter stops and `done` rises, so
// the memory is not read past its end. Outside a run, and after it, the
// output is zero, which serves as padding/preamble while the receiver's
// carrier loop acquires lock.
//
// Following the design: an 8-bit stored-data ROM stepped by a counter at one
// byte per four symbols, with a means to stop it after the data. The load
// port, the zero padding and the `done` flag are this implementation's
// choices.
module data_rom #(
  parameter int DEPTH  = 625,
  parameter int DATA_W = 8,
  parameter int AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load_we,
  input  logic [AW-1:0]     load_addr,
  input  logic [DATA_W-1:0] load_data,
  input  logic              run,
  input  logic              byte_req,
  output logic [DATA_W-1:0] byte_out,
  output logic              done
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     addr;

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr     <= '0;
      done     <= 1'b0;
      byte_out <= '0;
    end else if (byte_req) begin
      if (run && !done) begin
        byte_out <= mem[addr];
        if (addr == AW'(DEPTH - 1)) done <= 1'b1;
        else                        addr <= addr + 1'b1;
      end else begin
        byte_out <= '0;
      end
    end
  end

endmodule
