// tb_qpsk_colour_image: carries a full-colour 25 x 25 pixel image (8 bits
// per colour, 3 * 625 = 1875 bytes) through the whole transceiver. The
// top's data memory is enlarged to 1875 bytes for this run; everything else
// is at its default.
//
// The picture is a procedurally generated test pattern, stored plane by
// plane (all red bytes, then green, then blue); that order is this test's
// choice. The channel is the same one-register loopback as in the default
// end-to-end test, but inverted (a 180 degree carrier phase shift), and the
// receive oscillator runs 1e-5 of the clock rate away from the carrier. The
// carrier loop must pull in the offset and lock 180 degrees away, and the
// differential decoding must still return every colour byte unchanged, so
// that no colour of the picture is inverted.
//
// Checks: correction tracks the offset; the whole 1875-byte image appears
// in the received stream byte for byte; one byte every 32 clocks; each of
// the three planes is checked separately; the receiver delay (start of the
// image in the received stream) equals the delay of a single plane seen
// in the default test, i.e. a larger memory changes nothing but the length.
module tb_qpsk_colour_image;
  import qpsk_pkg::*;

  localparam int  SIDE     = 25;
  localparam int  PLANE    = SIDE * SIDE;
  localparam int  N        = 3 * PLANE;
  localparam int  AW       = $clog2(N);
  localparam int  LOCK_CLK = 48000;
  localparam int  OFFSET   = 42950;
  localparam int  RXN      = 4096;
  localparam real PI       = 3.14159265358979;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic          load_we = 1'b0;
  logic [AW-1:0] load_addr = '0;
  logic [7:0]    load_data = '0;
  logic          tx_run = 1'b0, tx_done;
  logic [31:0]   upconv_freq = 32'h4000_0000, downconv_freq = 32'h4000_0000;
  logic signed [31:0] kp, ki, k;
  logic          crr = 1'b0;
  logic [13:0]   dac_code, adc_code;
  logic [7:0]    rx_byte;
  logic          rx_byte_vld, xy_vld;
  logic signed [15:0] x_out, y_out;
  logic signed [17:0] phase_err;
  logic signed [31:0] freq_adj;

  qpsk_sdr_top #(.ROM_DEPTH(N)) dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .tx_run, .tx_done,
    .upconv_freq, .downconv_freq, .kp, .ki, .k, .carrier_rec_reset(crr),
    .dac_code, .adc_code, .rx_byte, .rx_byte_vld, .x_out, .y_out, .xy_vld,
    .phase_err, .freq_adj
  );

  // channel: one register, analog signal inverted
  always_ff @(posedge clk) adc_code <= ~dac_code;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // test pattern: red grows along x, green along y, blue is a checkerboard
  // with a diagonal ramp; byte i of the memory is plane i / 625
  function automatic logic [7:0] pixel(input int plane, input int r, input int c);
    case (plane)
      0:       return 8'(c * 10 + 5);
      1:       return 8'(r * 10 + 3);
      default: return 8'((((r >> 2) ^ (c >> 2)) & 1) != 0 ? 8'(200 - r - c) : 8'(40 + r + c));
    endcase
  endfunction

  function automatic logic [7:0] img(input int i);
    return pixel(i / PLANE, (i % PLANE) / SIDE, i % SIDE);
  endfunction

  logic [7:0] rxbuf [RXN];
  int         nrx = 0;
  int         last_vld_cyc = -1;
  int         bad_spacing = 0;
  bit         capture = 1'b0;

  always @(posedge clk) begin
    if (capture && rx_byte_vld) begin
      if (nrx < RXN) rxbuf[nrx] = rx_byte;
      nrx++;
      if (last_vld_cyc >= 0 && cyc - last_vld_cyc != 32) bad_spacing++;
      last_vld_cyc = cyc;
    end
  end

  function automatic int find_image();
    for (int d = 0; d + N <= nrx && d + N <= RXN; d++) begin
      bit ok = 1'b1;
      for (int i = 0; i < N && ok; i++)
        if (rxbuf[d + i] != img(i)) ok = 1'b0;
      if (ok) return d;
    end
    return -1;
  endfunction

  initial begin
    real    th, den, avg;
    longint adj_sum;
    int     where, start;
    int     plane_err [3];
    th  = 2.0 * PI * 1000.0 / 6.25e6;
    den = 1.0 + $sqrt(2.0) * th + th * th;
    kp  = 32'($rtoi(2.0 * $sqrt(2.0) * th / den * 2.0 ** 31));
    ki  = 32'($rtoi(4.0 * th * th / den * 2.0 ** 31));
    k   = 32'($rtoi(-(2.0 ** 32) / (32.0 * PI * 13770.0)));
    downconv_freq = 32'h4000_0000 + OFFSET;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      load_we = 1'b1; load_addr = AW'(i); load_data = img(i);
    end
    @(posedge clk);
    load_we = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;

    repeat (LOCK_CLK) @(posedge clk);
    adj_sum = 0;
    for (int i = 0; i < 8000; i++) begin
      @(posedge clk);
      adj_sum += longint'(freq_adj);
    end
    avg = real'(adj_sum) / 8000.0;
    $display("mean correction %0.1f (offset %0d)", avg, OFFSET);
    check(avg > 0.9 * OFFSET && avg < 1.1 * OFFSET, "loop tracks the frequency offset");

    // send the image; done rises when the last byte has been handed over
    capture = 1'b1;
    start   = cyc;
    tx_run  = 1'b1;
    wait (tx_done);
    $display("memory read took %0d clocks for %0d bytes", cyc - start, N);
    check(cyc - start >= (N - 1) * 32 && cyc - start <= (N - 1) * 32 + 16, "memory read at one byte per 32 clocks");
    repeat (32 * 60) @(posedge clk);
    capture = 1'b0;

    where = find_image();
    $display("%0d bytes received, %0d-byte colour image found at byte %0d", nrx, N, where);
    check(where >= 0, "colour image recovered byte for byte");
    check(where == 5, "receive delay the same as for a single plane");
    check(bad_spacing == 0, "one received byte every 32 clocks");

    // plane by plane, at the delay found for a single plane
    plane_err = '{0, 0, 0};
    for (int i = 0; i < N; i++)
      if (5 + i >= nrx || rxbuf[5 + i] != img(i)) plane_err[i / PLANE]++;
    check(plane_err[0] == 0, "red plane intact");
    check(plane_err[1] == 0, "green plane intact");
    check(plane_err[2] == 0, "blue plane intact");
    if (plane_err[0] + plane_err[1] + plane_err[2] != 0)
      $display("wrong bytes per plane: R %0d G %0d B %0d", plane_err[0], plane_err[1], plane_err[2]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
