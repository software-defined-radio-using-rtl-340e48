// tb_qpsk_sdr_top: end-to-end test of the QPSK transceiver at its default
// size (a 625-byte image, one colour plane of 25 x 25 pixels).
//
// The DAC code is looped back to the ADC through one register, optionally
// inverted (a 180 degree carrier phase shift). The receive oscillator runs
// 1e-5 of the clock rate (42950 / 2^32) away from the transmit carrier, so
// the carrier loop must pull in a frequency offset. Loop constants come from
// the PI formulas at a 1 kHz loop bandwidth and a 6.25 MHz symbol rate;
// K = -2^32 / (32*pi*A) with A = 13770, the per-axis symbol amplitude seen
// at the decimator output.
//
// Scenarios, each from reset:
//   A  direct channel, +offset: lock, then send the image; it must come back
//      byte for byte, one byte per 32 clocks.
//   B  inverted channel, same offset: the loop locks 180 degrees away from
//      A (X has the opposite sign), and the differential decoding still
//      returns the image unchanged.
//   C  carrier-recovery reset held: no correction, the constellation keeps
//      turning; after release the loop locks and the image comes back.
// Counted mechanisms: frequency offset tracked, 180 degree ambiguity seen
// and removed, loop reset, end of data (memory stops, padding follows).
module tb_qpsk_sdr_top;
  import qpsk_pkg::*;

  localparam int  N        = 625;
  localparam int  AW       = $clog2(N);
  localparam int  LOCK_CLK = 48000;
  localparam int  OFFSET   = 42950;
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
  logic          invert = 1'b0;

  qpsk_sdr_top dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .tx_run, .tx_done,
    .upconv_freq, .downconv_freq, .kp, .ki, .k, .carrier_rec_reset(crr),
    .dac_code, .adc_code, .rx_byte, .rx_byte_vld, .x_out, .y_out, .xy_vld,
    .phase_err, .freq_adj
  );

  // channel: one register, optional inversion of the analog signal
  always_ff @(posedge clk) adc_code <= invert ? ~dac_code : dac_code;

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

  function automatic logic [7:0] img(input int i);
    return 8'((i * 37) ^ (i >>> 3) * 11 ^ 8'h5a);
  endfunction

  // ---- capture of received bytes and symbols ----
  logic [7:0] rxbuf [4096];
  int         nrx = 0;
  int         last_vld_cyc = -1;
  int         bad_spacing = 0;
  int         nsym = 0;
  bit         capture = 1'b0;
  localparam int NS = 12000;
  bit         xsign_a [NS];
  int         opposite = 0, compared = 0;
  bit         compare_to_a = 1'b0;

  always @(posedge clk) begin
    if (capture && rx_byte_vld) begin
      if (nrx < 4096) rxbuf[nrx] = rx_byte;
      nrx++;
      if (last_vld_cyc >= 0 && cyc - last_vld_cyc != 32) bad_spacing++;
      last_vld_cyc = cyc;
    end
    if (xy_vld && !rst) begin
      if (nsym < NS) begin
        if (!compare_to_a) xsign_a[nsym] = x_out[15];
        else if (nsym > 6000) begin
          compared++;
          if (xsign_a[nsym] != x_out[15]) opposite++;
        end
      end
      nsym++;
    end
  end

  int n_freq_tracked = 0, n_ambiguity = 0, n_loop_reset = 0, n_end_of_data = 0;

  // a +-90 degree lock swaps the I and Q bit of every decoded symbol
  function automatic logic [7:0] swap_pairs(input logic [7:0] b);
    return {b[6], b[7], b[4], b[5], b[2], b[3], b[0], b[1]};
  endfunction

  // find the offset at which the whole image appears in the received bytes,
  // as sent (swapped = 0) or with the bits of each symbol swapped (1)
  function automatic int find_image(input bit swapped);
    for (int d = 0; d + N <= nrx && d < 4096 - N; d++) begin
      bit ok = 1'b1;
      for (int i = 0; i < N && ok; i++)
        if (rxbuf[d + i] != (swapped ? swap_pairs(img(i)) : img(i))) ok = 1'b0;
      if (ok) return d;
    end
    return -1;
  endfunction

  int n_quarter_lock = 0;

  task automatic run_scenario(input string name, input bit inv, input bit hold_reset, output int where);
    longint adj_sum;
    int     adj_n;
    rst = 1'b1; invert = inv; tx_run = 1'b0; crr = hold_reset;
    nrx = 0; last_vld_cyc = -1; bad_spacing = 0; nsym = 0; capture = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    if (hold_reset) begin
      int turns = 0;
      logic q0, q1;
      repeat (LOCK_CLK / 2) @(posedge clk);
      check(freq_adj == 0, {name, ": correction stays zero while the loop is reset"});
      // without correction the constellation rotates: X's sign pattern
      // vs. Y's keeps changing even though the data (padding) is constant
      q0 = x_out[15] ^ y_out[15];
      for (int i = 0; i < 40000; i++) begin
        @(posedge clk);
        q1 = x_out[15] ^ y_out[15];
        if (xy_vld && q1 != q0) begin turns++; q0 = q1; end
      end
      check(turns > 0, {name, ": constellation turns while the loop is held in reset"});
      if (freq_adj == 0 && turns > 0) n_loop_reset++;
      crr = 1'b0;
    end
    repeat (LOCK_CLK) @(posedge clk);
    // locked: the correction averages to the frequency offset
    adj_sum = 0; adj_n = 0;
    for (int i = 0; i < 8000; i++) begin
      @(posedge clk);
      adj_sum += longint'(freq_adj); adj_n++;
    end
    begin
      real avg;
      avg = real'(adj_sum) / real'(adj_n);
      $display("%s: mean correction %0.1f (offset %0d)", name, avg, OFFSET);
      check(avg > 0.9 * OFFSET && avg < 1.1 * OFFSET, {name, ": loop tracks the frequency offset"});
      if (avg > 0.9 * OFFSET && avg < 1.1 * OFFSET) n_freq_tracked++;
    end
    // send the image
    capture = 1'b1;
    tx_run  = 1'b1;
    wait (tx_done);
    repeat (32 * 60) @(posedge clk);
    capture = 1'b0;
    where = find_image(1'b0);
    $display("%s: %0d bytes received, image found at byte %0d", name, nrx, where);
    if (!hold_reset) begin
      check(where >= 0, {name, ": image recovered byte for byte"});
    end else begin
      // after a reset the loop may settle on any of the four lock points;
      // the bit-wise differential code removes 0/180 degrees only, a
      // +-90 degree lock leaves the symbol bits swapped
      if (where < 0) begin
        where = find_image(1'b1);
        $display("%s: image found with I/Q swapped at byte %0d (90 degree lock)", name, where);
        if (where >= 0) n_quarter_lock++;
      end
      check(where >= 0, {name, ": image recovered, directly or I/Q swapped"});
    end
    check(bad_spacing == 0, {name, ": one received byte every 32 clocks"});
    if (where >= 0) begin
      bit pad_ok = 1'b1;
      for (int i = where + N; i < where + N + 40 && i < nrx; i++)
        if (rxbuf[i] != 8'h00) pad_ok = 1'b0;
      check(pad_ok && tx_done, {name, ": memory stops after the last byte, padding follows"});
      if (pad_ok && tx_done) n_end_of_data++;
    end
  endtask

  initial begin
    real th, den;
    int  wa, wb, wc;
    th  = 2.0 * PI * 1000.0 / 6.25e6;
    den = 1.0 + $sqrt(2.0) * th + th * th;
    kp  = 32'($rtoi(2.0 * $sqrt(2.0) * th / den * 2.0 ** 31));
    ki  = 32'($rtoi(4.0 * th * th / den * 2.0 ** 31));
    k   = 32'($rtoi(-(2.0 ** 32) / (32.0 * PI * 13770.0)));
    $display("Kp=%0d Ki=%0d K=%0d (Q.31, Q.31, integer)", kp, ki, k);
    downconv_freq = 32'h4000_0000 + OFFSET;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      load_we = 1'b1; load_addr = AW'(i); load_data = img(i);
    end
    @(posedge clk);
    load_we = 1'b0;

    compare_to_a = 1'b0;
    run_scenario("A direct", 1'b0, 1'b0, wa);
    compare_to_a = 1'b1;
    run_scenario("B inverted", 1'b1, 1'b0, wb);
    $display("B: X sign opposite to A on %0d of %0d symbols", opposite, compared);
    check(compared > 0 && opposite * 100 > compared * 95, "B: receiver locked 180 degrees away from A");
    if (compared > 0 && opposite * 100 > compared * 95 && wb >= 0) n_ambiguity++;
    check(wa == wb, "same byte latency with and without inversion");
    compare_to_a = 1'b0;
    run_scenario("C loop reset", 1'b0, 1'b1, wc);

    $display("locks at +-90 degrees (I/Q swapped after decoding): %0d", n_quarter_lock);
    $display("mechanisms: freq_tracked=%0d ambiguity_resolved=%0d loop_reset=%0d end_of_data=%0d",
             n_freq_tracked, n_ambiguity, n_loop_reset, n_end_of_data);
    check(n_freq_tracked > 0, "frequency tracking happened");
    check(n_ambiguity > 0,    "phase ambiguity happened and was resolved");
    check(n_loop_reset > 0,   "loop reset happened");
    check(n_end_of_data > 0,  "end of data happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
