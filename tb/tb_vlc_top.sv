// tb_vlc_top: end-to-end run of vlc_top at its default parameters, with the
// LED output looped back to the ADC input through optical_channel_model.
//  1. OOK test mode: the LED must carry the PRBS7 sequence at 100 clocks per
//     bit (300 kbit/s at 30 MHz) while video bytes fill the cache until it
//     pushes back.
//  2. Switch to pulse-position mode; rx_sync is given on the ADC sample of the
//     first frame. 40 codewords are sent back to back; codewords get 0..3
//     jammed frames (must be corrected) and three get 6 (should be flagged
//     uncorrectable; their bytes are not compared).
//  3. 10 more codewords with bytes trickling in, so the modulator sends dark
//     idle frames, which the receiver must skip.
// Every received byte is compared with the sent stream. Each mechanism (PRBS
// bits, back-pressure, mode switch, dark frames, corrections, flagged
// codewords) must have happened at least once.
module tb_vlc_top;
  logic clk = 0, rst_n = 0;
  logic vid_valid, vid_ready, tx_mode_ook, led_on, tx_frame_start;
  logic [7:0] vid_data, adc_data, rx_data;
  logic rx_sync, rx_valid, rx_corrected, rx_block_fail, rx_no_peak, rx_overrun;
  logic [9:0] peak_min, rx_peak;
  logic tx_cw_start, rx_cw_start, rx_cw_done;
  int n_tx_cw = 0, n_rx_cw = 0, n_rx_cw_done = 0;
  logic jam, jam_led;
  int checks = 0, failures = 0;

  vlc_top dut (.*);
  optical_channel_model chan (.clk, .hi(190), .lo(35), .noise(12), .led_on, .jam, .jam_led, .adc_data);

  always #16.667 clk = ~clk;   // 30 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int PHASE_A_WORDS = 40;
  localparam int PHASE_B_WORDS = 10;
  localparam int NBYTES = (PHASE_A_WORDS + PHASE_B_WORDS) * 9 / 2;

  logic [7:0] sent [NBYTES];
  bit         exempt [NBYTES];
  int n_prbs = 0, n_backpressure = 0, n_switch = 0, n_dark = 0, n_corr = 0, n_fail = 0;
  int n_rx = 0, pushed = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---- event counters ----
  always @(posedge clk) if (rst_n) begin
    if (rx_no_peak)    n_dark++;
    if (rx_corrected)  n_corr++;
    if (rx_block_fail) n_fail++;
    if (tx_cw_start)   n_tx_cw++;
    if (rx_cw_start)   n_rx_cw++;
    if (rx_cw_done)    n_rx_cw_done++;
    if (!vid_ready && vid_valid) n_backpressure++;
  end

  // ---- received bytes ----
  always @(posedge clk) begin
    #2;
    if (rx_valid) begin
      if (n_rx >= NBYTES) begin failures++; $display("extra byte"); end
      else if (!exempt[n_rx]) begin
        checks++;
        if (rx_data != sent[n_rx]) begin failures++; $display("byte %0d got %02h exp %02h", n_rx, rx_data, sent[n_rx]); end
      end
      n_rx++;
    end
  end

  // ---- jamming per pulse-position frame ----
  int  frame_no = -1;
  int  jams [PHASE_A_WORDS];
  int  jam_slot, fcyc = 0;
  bit  ppm_on = 0;
  bit  jam_frame = 0;
  always @(posedge clk) begin
    #1;
    if (tx_frame_start && ppm_on) begin
      frame_no++;
      fcyc = 0;
      jam_frame = 0;
      if (frame_no < PHASE_A_WORDS * 15) begin
        int c, k;
        c = frame_no / 15; k = frame_no % 15;
        jam_frame = (k < jams[c]);
        jam_slot = $urandom_range(15);
      end
    end else fcyc++;
    jam     = jam_frame && (fcyc < 64);
    jam_led = (fcyc / 4 == jam_slot);
  end

  // ---- rx_sync: the ADC sample of the first frame after the switch ----
  bit sync_armed = 0;
  logic [2:0] fs_pipe = 0;
  always @(posedge clk) begin
    fs_pipe <= {fs_pipe[1:0], tx_frame_start && sync_armed};
    if (tx_frame_start && sync_armed) sync_armed <= 0;
  end
  assign rx_sync = fs_pipe[2];

  task automatic push_byte(int i);
    vid_valid = 1; vid_data = sent[i];
    do @(posedge clk); while (!vid_ready);
    #1;
    vid_valid = 0;
  endtask

  initial begin
    bit prbs [200];
    for (int i = 0; i < 7; i++) prbs[i] = 1;
    for (int i = 7; i < 200; i++) prbs[i] = prbs[i-7] ^ prbs[i-6];
    foreach (sent[i]) sent[i] = 8'($urandom_range(255));
    foreach (exempt[i]) exempt[i] = 0;
    foreach (jams[c]) jams[c] = c % 4;
    jams[9] = 6; jams[22] = 6; jams[35] = 6;
    foreach (jams[c]) if (jams[c] > 3)
      for (int s = 9 * c; s < 9 * c + 9; s++) exempt[s / 2] = 1;

    vid_valid = 0; vid_data = 0; tx_mode_ook = 1; peak_min = 10'd480;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // ---- 1. OOK / PRBS test mode; bytes go into the cache meanwhile ----
    fork
      begin
        repeat (51) @(posedge clk);
        for (int i = 0; i < 60; i++) begin
          #2;
          checks++;
          n_prbs++;
          if (led_on != prbs[i]) begin failures++; $display("OOK bit %0d is %0d exp %0d", i, led_on, prbs[i]); end
          repeat (100) @(posedge clk);
        end
      end
      begin
        // nothing is read from the cache in OOK mode: it takes 16 bytes
        while (pushed < 16) begin
          vid_valid = 1; vid_data = sent[pushed];
          checks++;
          if (!vid_ready) begin failures++; $display("cache full after %0d bytes", pushed); end
          @(posedge clk); #1;
          pushed++;
        end
        vid_data = sent[pushed];
        checks++;
        if (vid_ready) begin failures++; $display("cache not full after 16 bytes"); end
        // the cache is full: keep offering the next byte for a while
        repeat (20) @(posedge clk);
        #1 vid_valid = 0;
      end
    join
    checks++;
    if (pushed != 16) begin failures++; $display("cache took %0d bytes", pushed); end
    // ---- 2. pulse-position mode ----
    @(posedge clk); #1;
    tx_mode_ook = 0; n_switch++;
    ppm_on = 1; sync_armed = 1;
    for (int i = pushed; i < PHASE_A_WORDS * 9 / 2; i++) push_byte(i);
    pushed = PHASE_A_WORDS * 9 / 2;
    // ---- 3. slow bytes: dark frames in between ----
    for (int i = pushed; i < NBYTES; i++) begin
      repeat (300) @(posedge clk);
      #1 push_byte(i);
    end
    // drain: last codeword over the air and through the decoder
    repeat (15 * 64 + 200) @(posedge clk);
    checks += 8;
    if (n_rx != NBYTES)    begin failures++; $display("received %0d of %0d bytes", n_rx, NBYTES); end
    if (n_prbs == 0)       begin failures++; $display("no PRBS bits checked"); end
    if (n_backpressure == 0) begin failures++; $display("cache never pushed back"); end
    if (n_switch == 0)     begin failures++; $display("no mode switch"); end
    if (n_dark == 0)       begin failures++; $display("no dark idle frame"); end
    if (n_corr == 0)       begin failures++; $display("no correction"); end
    if (n_fail == 0)       begin failures++; $display("no uncorrectable codeword flagged"); end
    if (n_tx_cw != PHASE_A_WORDS + PHASE_B_WORDS || n_rx_cw != n_tx_cw || n_rx_cw_done != n_tx_cw) begin
      failures++; $display("codewords sent %0d, started %0d, done %0d", n_tx_cw, n_rx_cw, n_rx_cw_done);
    end
    checks++;
    if (rx_peak < 10'd600)  begin failures++; $display("received level %0d", rx_peak); end
    checks++;
    if (rx_overrun)        begin failures++; $display("decoder overrun"); end
    $display("PRBS bits %0d, back-pressure cycles %0d, mode switches %0d, dark frames %0d, corrected symbols %0d, flagged codewords %0d, bytes %0d",
             n_prbs, n_backpressure, n_switch, n_dark, n_corr, n_fail, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
