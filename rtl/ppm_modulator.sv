// ppm_modulator: drives the LED with pulse-position frames or, in test mode, OOK.
//
// Pulse-position mode: each 4-bit code symbol becomes a frame of SLOTS = 16
// slots of SAMPLES_PER_SLOT clocks; exactly the slot whose index equals the
// symbol is lit. A symbol is taken at every frame boundary; if none is ready
// the frame stays dark, which the receiver skips, so the link idles without
// losing codeword alignment. OOK mode (the eye-diagram test): a new bit is taken
// every OOK_DIV clocks and the LED follows it (on for 1). A change of mode
// restarts the frame or bit timing. The document gives the pulse-position
// receiver and the 300 kbit/s OOK test; the 16-slot frame, one symbol per frame
// and the dark idle frame are this implementation's choices.
//
// Interface: sym_valid/sym_ready/sym handshake (sym_ready only on a frame
// boundary in pulse-position mode); bit_in is sampled when bit_take pulses.
// frame_start is high on the clock in which led_on shows the first sample of
// a pulse-position frame (a test
// point for aligning instruments or the receiver). led_on is registered.
module ppm_modulator #(
  parameter int unsigned SLOTS            = 16,
  parameter int unsigned SAMPLES_PER_SLOT = 4,
  parameter int unsigned OOK_DIV          = 100
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mode_ook,
  input  logic                     sym_valid,
  input  logic [$clog2(SLOTS)-1:0] sym,
  output logic                     sym_ready,
  input  logic                     bit_in,
  output logic                     bit_take,
  output logic                     frame_start,
  output logic                     led_on
);
  localparam int unsigned FRAME = SLOTS * SAMPLES_PER_SLOT;
  localparam int unsigned CNTW  = $clog2((FRAME > OOK_DIV) ? FRAME : OOK_DIV);

  logic                     mode_q;
  logic                     restart;
  logic [CNTW-1:0]          cyc;
  logic                     lit;
  logic [$clog2(SLOTS)-1:0] cur_sym;
  logic                     cur_bit;
  logic                     boundary;
  logic                     led_d;

  assign restart   = (mode_q != mode_ook);
  assign boundary  = restart || (mode_ook ? (cyc == CNTW'(OOK_DIV - 1)) : (cyc == CNTW'(FRAME - 1)));
  assign sym_ready = !mode_ook && boundary;
  assign bit_take  = mode_ook && boundary;

  always_comb begin
    if (mode_q) led_d = cur_bit;
    else        led_d = lit && (cyc / CNTW'(SAMPLES_PER_SLOT) == CNTW'(cur_sym));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q      <= 1'b0;
      cyc         <= CNTW'(FRAME - 1);
      lit         <= 1'b0;
      cur_sym     <= '0;
      cur_bit     <= 1'b0;
      frame_start <= 1'b0;
      led_on      <= 1'b0;
    end else begin
      mode_q      <= mode_ook;
      frame_start <= !mode_q && (cyc == '0);  // same clock as led_on of slot 0
      led_on      <= led_d;
      if (boundary) begin
        cyc <= '0;
        if (mode_ook) begin
          cur_bit <= bit_in;
        end else begin
          lit     <= sym_valid;
          cur_sym <= sym;
        end
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end
endmodule
