// tb_vlc_video: a small grey-scale test image (32 x 24 pixels, 8 bits) sent
// through vlc_top at default parameters and looped back through the optical
// channel model, at three channel qualities standing in for increasing
// distance:
//   near - strong light, little noise: no symbol may be misjudged;
//   mid  - weaker light, more noise: some pulse positions are misjudged and
//          the RS decoder must repair them; the image must arrive intact;
//   far  - weak light, heavy noise: many misjudged pulses; the decoder must
//          leave fewer wrong bytes than there were wrong symbols.
// Raw symbol errors are counted by comparing the pulse position decisions
// with the transmitted code symbols (from the reference encoder). Each run
// resets the link, pre-fills the cache in OOK mode, switches to pulse-position
// mode and syncs the receiver on the first frame.
module tb_vlc_video;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic vid_valid, vid_ready, tx_mode_ook, led_on, tx_frame_start;
  logic [7:0] vid_data, adc_data, rx_data;
  logic rx_sync, rx_valid, rx_corrected, rx_block_fail, rx_no_peak, rx_overrun;
  logic tx_cw_start, rx_cw_start, rx_cw_done;
  logic [9:0] peak_min, rx_peak;
  int hi, lo, noise;
  int checks = 0, failures = 0;

  vlc_top dut (.*);
  optical_channel_model chan (.clk, .hi, .lo, .noise, .led_on, .jam(1'b0), .jam_led(1'b0), .adc_data);

  always #16.667 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int W = 32, H = 24;
  localparam int NBYTES = 774;           // 768 pixels padded to whole codewords (86 x 9 bytes = 172 codewords)
  localparam int NWORDS = NBYTES * 2 / 9;

  logic [7:0] img [NBYTES];
  int unsigned code [NWORDS * 15];      // transmitted symbols
  int n_rx, n_byte_err, n_raw_err, n_dec, n_corr, n_flag;

  // ---- received bytes ----
  always @(posedge clk) begin
    #2;
    if (rst_n && rx_valid) begin
      if (n_rx < NBYTES && rx_data != img[n_rx]) n_byte_err++;
      n_rx++;
    end
  end

  // ---- raw pulse-position decisions against the transmitted symbols ----
  always @(posedge clk) begin
    #2;
    if (rst_n && dut.d_valid) begin
      if (n_dec < NWORDS * 15 && int'(dut.d_sym) != code[n_dec]) n_raw_err++;
      n_dec++;
    end
    if (rst_n && rx_corrected)  n_corr++;
    if (rst_n && rx_block_fail) n_flag++;
  end

  // ---- rx_sync on the ADC sample of the first frame after the switch ----
  bit sync_armed = 0;
  logic [2:0] fs_pipe = 0;
  always @(posedge clk) begin
    fs_pipe <= {fs_pipe[1:0], tx_frame_start && sync_armed};
    if (tx_frame_start && sync_armed) sync_armed <= 0;
  end
  assign rx_sync = fs_pipe[2];

  task automatic run(string name, int h, int l, int nz, int thr);
    hi = h; lo = l; noise = nz; peak_min = 10'(thr);
    n_rx = 0; n_byte_err = 0; n_raw_err = 0; n_dec = 0; n_corr = 0; n_flag = 0;
    rst_n = 0; vid_valid = 0; tx_mode_ook = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // pre-fill the cache while the modulator is in OOK mode
    for (int i = 0; i < 16; i++) begin
      vid_valid = 1; vid_data = img[i]; @(posedge clk); #1;
    end
    vid_valid = 0;
    tx_mode_ook = 0; sync_armed = 1;
    for (int i = 16; i < NBYTES; i++) begin
      vid_valid = 1; vid_data = img[i];
      do @(posedge clk); while (!vid_ready);
      #1;
    end
    vid_valid = 0;
    repeat (60 * 64) @(posedge clk);
    #1;
    $display("%s: hi %0d lo %0d noise +/-%0d: symbols %0d, misjudged %0d, corrected %0d, flagged codewords %0d, bytes %0d, wrong bytes %0d",
             name, h, l, nz, n_dec, n_raw_err, n_corr, n_flag, n_rx, n_byte_err);
    checks++;
    if (n_rx < NBYTES) begin failures++; $display("%s: only %0d bytes received", name, n_rx); end
  endtask

  initial begin
    int unsigned msg [9];
    int unsigned cw [15];
    int raw_far, bad_far;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y * W + x] = 8'((x * 8 + y * 5) ^ ((x * y) & 8'h3c));
    for (int i = W * H; i < NBYTES; i++) img[i] = 8'h00;
    for (int c = 0; c < NWORDS; c++) begin
      for (int k = 0; k < 9; k++) begin
        int s;
        s = c * 9 + k;
        msg[k] = (s % 2 == 0) ? img[s / 2][7:4] : img[s / 2][3:0];
      end
      encode(msg, cw);
      for (int k = 0; k < 15; k++) code[c * 15 + k] = cw[k];
    end

    run("near", 200, 30, 10, 300);
    checks += 2;
    if (n_raw_err != 0) begin failures++; $display("near: misjudged symbols"); end
    if (n_byte_err != 0) begin failures++; $display("near: wrong bytes"); end

    run("mid", 130, 50, 55, 260);
    checks += 2;
    if (n_raw_err == 0) begin failures++; $display("mid: channel too clean to exercise the decoder"); end
    if (n_byte_err != 0 || n_corr == 0) begin failures++; $display("mid: image not repaired"); end

    run("far", 120, 50, 70, 260);
    raw_far = n_raw_err; bad_far = n_byte_err;
    checks++;
    if (raw_far == 0 || bad_far >= raw_far) begin failures++; $display("far: decoding did not reduce errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
