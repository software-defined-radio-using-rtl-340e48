// qpsk_sdr_top: complete QPSK software-defined-radio transceiver.
//
// Transmitter: a byte memory (data_rom) is read at one byte per four
// symbols; each byte is split into four 2-bit symbols (tdm_8to2),
// differentially encoded (diff_encoder), mapped to +-1/sqrt(2) on I and Q
// (qpsk_mapper), shaped and up-sampled by 8 with raised-cosine polyphase
// interpolators, modulated onto the carrier (upconverter, s = I cos - Q sin)
// and converted to the DAC's unsigned code (adac_format).
//
// Receiver: the ADC code is converted back to signed, mixed down with a
// local oscillator whose increment is `downconv_freq` minus the loop's
// correction (downconverter), filtered and decimated by 8 (polyphase_decim)
// to one X/Y pair per symbol. The carrier-recovery loop (phase detector,
// PI loop filter, gain K) steers the oscillator until the constellation
// stands still. Symbols are sliced (symbol_slicer), differentially decoded
// (diff_decoder), delayed to the byte boundary (sym_delay) and regrouped into
// bytes (tdm_2to8).
//
// Interface: one clock for everything (50 MHz in the design, so the 2^30
// carrier word is 12.5 MHz and the symbol rate 6.25 MHz). The DAC/ADC and
// the channel between them are outside: `dac_code` goes out, `adc_code`
// comes in. Carrier frequency words and the loop constants Kp, Ki, K are
// run-time inputs, as is `carrier_rec_reset`. X, Y, the phase error and the
// correction are brought out for observation (the constellation display).
//
// The block chain follows the design's system diagram. The symbol timing
// is fixed: transmitter and receiver share the clock and DEC_PHASE sets the
// decimators' sampling instant; with a direct DAC-to-ADC loopback (one
// register), DEC_PHASE = 0 samples at the peak of the received pulse.
// SYS_DELAY, the symbol delay in front of the byte demultiplexer, has to
// make the total transmit-to-receive latency a whole number of bytes. The
// design used 2 for its own pipeline; the latencies of this implementation
// need 3.
module qpsk_sdr_top
  import qpsk_pkg::*;
#(
  parameter int ROM_DEPTH = 625,
  parameter int DEC_PHASE = 0,
  parameter int SYS_DELAY = 3,
  localparam int AW = (ROM_DEPTH > 1) ? $clog2(ROM_DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst,
  // data memory load port and transmit control
  input  logic               load_we,
  input  logic [AW-1:0]      load_addr,
  input  logic [7:0]         load_data,
  input  logic               tx_run,
  output logic               tx_done,
  // carrier frequencies (phase increment per clock, 2^32 = clock rate)
  input  logic [31:0]        upconv_freq,
  input  logic [31:0]        downconv_freq,
  // carrier-recovery loop constants and reset
  input  logic signed [31:0] kp,
  input  logic signed [31:0] ki,
  input  logic signed [31:0] k,
  input  logic               carrier_rec_reset,
  // data converters
  output logic [13:0]        dac_code,
  input  logic [13:0]        adc_code,
  // received data
  output logic [7:0]         rx_byte,
  output logic               rx_byte_vld,
  // observation
  output logic signed [15:0] x_out,
  output logic signed [15:0] y_out,
  output logic               xy_vld,
  output logic signed [17:0] phase_err,
  output logic signed [31:0] freq_adj
);

  // ---------------- transmitter ----------------
  logic [2:0] tx_cnt;
  logic       sym_stb;

  always_ff @(posedge clk) begin
    if (rst) tx_cnt <= '0;
    else     tx_cnt <= tx_cnt + 1'b1;
  end
  assign sym_stb = (tx_cnt == 3'd7);

  logic [7:0] rom_byte;
  logic       byte_req;
  sym_t       tx_sym, enc_sym;
  logic       tx_sym_vld, enc_vld, map_vld;
  logic signed [31:0] i_sym, q_sym, i_shaped, q_shaped;
  logic signed [13:0] tx_sample;

  data_rom #(.DEPTH(ROM_DEPTH), .DATA_W(8)) u_rom (
    .clk(clk), .rst(rst), .load_we(load_we), .load_addr(load_addr),
    .load_data(load_data), .run(tx_run), .byte_req(byte_req),
    .byte_out(rom_byte), .done(tx_done)
  );

  tdm_8to2 u_tdm_tx (
    .clk(clk), .rst(rst), .sym_stb(sym_stb), .byte_in(rom_byte),
    .byte_req(byte_req), .sym_out(tx_sym), .sym_vld(tx_sym_vld)
  );

  diff_encoder u_denc (
    .clk(clk), .rst(rst), .in_vld(tx_sym_vld), .sym_in(tx_sym),
    .sym_out(enc_sym), .out_vld(enc_vld)
  );

  qpsk_mapper #(.W(32)) u_map (
    .clk(clk), .rst(rst), .sym_in(enc_sym), .i_out(i_sym), .q_out(q_sym)
  );

  always_ff @(posedge clk) begin
    if (rst) map_vld <= 1'b0;
    else     map_vld <= enc_vld;
  end

  polyphase_interp #(.L(SPS), .NTAPS(RC_LEN), .IN_W(32), .OUT_W(32), .SHIFT(15)) u_interp_i (
    .clk(clk), .rst(rst), .in_vld(map_vld), .x_in(i_sym), .y_out(i_shaped)
  );
  polyphase_interp #(.L(SPS), .NTAPS(RC_LEN), .IN_W(32), .OUT_W(32), .SHIFT(15)) u_interp_q (
    .clk(clk), .rst(rst), .in_vld(map_vld), .x_in(q_sym), .y_out(q_shaped)
  );

  upconverter #(.IN_W(32), .OUT_W(14)) u_up (
    .clk(clk), .rst(rst), .carrier_inc(upconv_freq), .i_in(i_shaped),
    .q_in(q_shaped), .s_out(tx_sample)
  );

  logic signed [13:0] rx_sample;

  adac_format #(.W(14)) u_fmt (
    .clk(clk), .rst(rst), .tx_in(tx_sample), .dac_code(dac_code),
    .adc_code(adc_code), .rx_out(rx_sample)
  );

  // ---------------- receiver ----------------
  logic signed [15:0] i_mix, q_mix, x_dec, y_dec;
  logic               x_vld, y_vld_unused;

  downconverter #(.IN_W(14), .OUT_W(16)) u_down (
    .clk(clk), .rst(rst), .freq(downconv_freq), .freq_adj(freq_adj),
    .r_in(rx_sample), .i_out(i_mix), .q_out(q_mix)
  );

  polyphase_decim #(.M(SPS), .NTAPS(RC_LEN), .IN_W(16), .OUT_W(16), .SHIFT(16), .PHASE(DEC_PHASE)) u_dec_i (
    .clk(clk), .rst(rst), .x_in(i_mix), .y_out(x_dec), .y_vld(x_vld)
  );
  polyphase_decim #(.M(SPS), .NTAPS(RC_LEN), .IN_W(16), .OUT_W(16), .SHIFT(16), .PHASE(DEC_PHASE)) u_dec_q (
    .clk(clk), .rst(rst), .x_in(q_mix), .y_out(y_dec), .y_vld(y_vld_unused)
  );

  carrier_recovery #(.W(16), .KW(32)) u_cr (
    .clk(clk), .rst(rst), .rst_loop(carrier_rec_reset), .in_vld(x_vld),
    .x_in(x_dec), .y_in(y_dec), .kp(kp), .ki(ki), .k(k),
    .err(phase_err), .adj_out(freq_adj)
  );

  sym_t rx_sym, dec_sym, dly_sym;
  logic rx_sym_vld, dec_vld, dly_vld;

  symbol_slicer #(.W(16)) u_slice (
    .clk(clk), .rst(rst), .in_vld(x_vld), .x_in(x_dec), .y_in(y_dec),
    .sym_out(rx_sym), .out_vld(rx_sym_vld)
  );

  diff_decoder u_ddec (
    .clk(clk), .rst(rst), .in_vld(rx_sym_vld), .sym_in(rx_sym),
    .sym_out(dec_sym), .out_vld(dec_vld)
  );

  sym_delay #(.DELAY(SYS_DELAY)) u_dly (
    .clk(clk), .rst(rst), .in_vld(dec_vld), .sym_in(dec_sym),
    .sym_out(dly_sym), .out_vld(dly_vld)
  );

  tdm_2to8 u_tdm_rx (
    .clk(clk), .rst(rst), .in_vld(dly_vld), .sym_in(dly_sym),
    .byte_out(rx_byte), .byte_vld(rx_byte_vld)
  );

  assign x_out  = x_dec;
  assign y_out  = y_dec;
  assign xy_vld = x_vld;

endmodule
