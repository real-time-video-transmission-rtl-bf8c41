// optical_channel_model: behavioural model (not synthesizable logic) of the
// analog path between the two ends of the link: Bias-T LED driver, LED, free
// space, PIN photodiode, transimpedance and second amplifier, attenuator and
// the AD9280 8-bit ADC. The light level maps to an ADC code of hi or lo, plus
// uniform noise of +/-noise codes, clipped to 0..255; the ADC adds a pipeline
// delay of DELAY sample clocks. The levels are inputs so that a testbench can
// emulate a longer distance (weaker light, relatively more noise). jam replaces the LED by jam_led for the
// duration it is high, to emulate a burst of interference that moves or
// removes a pulse.
module optical_channel_model #(
  parameter int DELAY = 3
) (
  input  logic       clk,
  input  int         hi,
  input  int         lo,
  input  int         noise,
  input  logic       led_on,
  input  logic       jam,
  input  logic       jam_led,
  output logic [7:0] adc_data
);
  logic [7:0] pipe [DELAY];

  initial foreach (pipe[i]) pipe[i] = 8'd0;

  always @(posedge clk) begin
    int v;
    v = ((jam ? jam_led : led_on) ? hi : lo) + int'($urandom_range(2 * noise)) - noise;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    pipe[0] <= 8'(v);
    for (int i = 1; i < DELAY; i++) pipe[i] <= pipe[i-1];
  end

  assign adc_data = pipe[DELAY-1];
endmodule
