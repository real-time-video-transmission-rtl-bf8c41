// vlc_top: digital part of an LED visible-light video link, both ends.
//
// Transmitter: video bytes enter the register cache (tx_cache), are split into
// 4-bit symbols, RS(15,9) encoded (rs_encoder, 9 message + 6 parity symbols)
// and sent as 16-slot pulse-position frames by ppm_modulator, whose led_on
// output drives the LED's Bias-T driver. With tx_mode_ook high the modulator
// instead sends the PRBS7 test pattern as on-off keying at CLK/OOK_DIV
// (300 kbit/s at a 30 MHz clock) for eye-diagram measurements.
// Receiver: the 8-bit samples of the photodiode chain's ADC, taken on every
// clock, go through the pulse position decision (ppm_demod), the RS(15,9)
// decoder (rs_decoder, corrects up to 3 symbol errors per codeword) and byte
// reassembly (rx_unpack) to the display side.
// The two ends share a clock here only because they sit in one top; in a link
// they are separate boards, coupled only through light (led_on -> adc_data).
//
// Interface: vid_valid/vid_ready/vid_data take video bytes. tx_frame_start is
// a test point marking the first LED sample of each frame. rx_sync, with the
// ADC sample that holds the first sample of a frame, aligns the receiver's
// frame and codeword counters (the frame after it carries a codeword's first
// symbol); peak_min is the pulse detection threshold on a 4-sample window sum
// (set by the control processor). rx_valid/rx_data deliver bytes;
// rx_corrected, rx_block_fail and rx_no_peak report decoder and detector events;
// rx_peak is the window sum of the last detected pulse, a received-light
// level for aiming the lens and photodiode. tx_cw_start marks the frame that
// carries a codeword's first symbol; rx_cw_start / rx_cw_done mark the first
// and last decoded symbol of a codeword.
module vlc_top #(
  parameter int unsigned SAMPLES_PER_SLOT = 4,
  parameter int unsigned OOK_DIV          = 100,
  localparam int unsigned AW = $clog2(SAMPLES_PER_SLOT * 255 + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // transmitter
  input  logic          vid_valid,
  input  logic [7:0]    vid_data,
  output logic          vid_ready,
  input  logic          tx_mode_ook,
  output logic          led_on,
  output logic          tx_frame_start,
  // receiver
  input  logic [7:0]    adc_data,
  input  logic          rx_sync,
  input  logic [AW-1:0] peak_min,
  output logic          rx_valid,
  output logic [7:0]    rx_data,
  output logic          rx_corrected,
  output logic          rx_block_fail,
  output logic          rx_no_peak,
  output logic          rx_overrun,
  output logic [AW-1:0] rx_peak,
  output logic          tx_cw_start,
  output logic          rx_cw_start,
  output logic          rx_cw_done
);
  // ---------------- transmitter ----------------
  logic       c_valid, c_ready;
  logic [3:0] c_sym;
  logic       e_valid, e_ready, e_first;
  logic [3:0] e_sym;
  logic       prbs_bit, bit_take;

  tx_cache u_cache (
    .clk, .rst_n, .in_valid(vid_valid), .in_data(vid_data), .in_ready(vid_ready),
    .out_valid(c_valid), .out_sym(c_sym), .out_ready(c_ready)
  );

  rs_encoder u_enc (
    .clk, .rst_n, .in_valid(c_valid), .in_ready(c_ready), .in_sym(c_sym),
    .out_valid(e_valid), .out_ready(e_ready), .out_sym(e_sym), .out_first(e_first)
  );

  prbs_gen u_prbs (.clk, .rst_n, .advance(bit_take), .bit_out(prbs_bit));

  ppm_modulator #(.SAMPLES_PER_SLOT(SAMPLES_PER_SLOT), .OOK_DIV(OOK_DIV)) u_mod (
    .clk, .rst_n, .mode_ook(tx_mode_ook), .sym_valid(e_valid), .sym(e_sym),
    .sym_ready(e_ready), .bit_in(prbs_bit), .bit_take, .frame_start(tx_frame_start),
    .led_on
  );

  // ---------------- receiver ----------------
  logic       d_valid, d_first;
  logic [3:0] d_sym;
  logic       o_valid, o_first, o_is_msg, o_corr;
  logic [3:0] o_sym;

  ppm_demod #(.SAMPLES_PER_SLOT(SAMPLES_PER_SLOT)) u_demod (
    .clk, .rst_n, .smp_valid(1'b1), .smp(adc_data), .sync(rx_sync), .peak_min,
    .sym_valid(d_valid), .sym(d_sym), .sym_first(d_first), .peak(rx_peak),
    .no_peak(rx_no_peak)
  );

  rs_decoder u_dec (
    .clk, .rst_n, .in_valid(d_valid), .in_first(d_first), .in_sym(d_sym),
    .out_valid(o_valid), .out_sym(o_sym), .out_first(o_first), .out_is_msg(o_is_msg),
    .out_corrected(o_corr), .blk_done(rx_cw_done), .blk_fail(rx_block_fail),
    .overrun(rx_overrun)
  );

  rx_unpack u_unpack (
    .clk, .rst_n, .resync(rx_sync), .in_valid(o_valid), .in_is_msg(o_is_msg),
    .in_sym(o_sym), .out_valid(rx_valid), .out_data(rx_data)
  );

  assign rx_corrected = o_corr;
  assign rx_cw_start  = o_valid && o_first;
  assign tx_cw_start  = e_valid && e_ready && e_first;
endmodule
