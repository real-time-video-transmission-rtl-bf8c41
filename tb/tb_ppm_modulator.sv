// tb_ppm_modulator: pulse-position frames for random symbols (with gaps that
// must give dark frames), then OOK mode and back. Each frame must be 64 clocks
// with the LED lit on exactly the 4 clocks of slot "symbol", counted from
// frame_start; in OOK mode each bit must last exactly OOK_DIV = 100 clocks and
// follow bit_in as taken on bit_take.
module tb_ppm_modulator;
  logic clk = 0, rst_n = 0;
  logic mode_ook, sym_valid, sym_ready, bit_in, bit_take, frame_start, led_on;
  logic [3:0] sym;
  int checks = 0, failures = 0;

  ppm_modulator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // symbols taken, in order (-1 = dark frame)
  int taken [$];
  always @(posedge clk) if (rst_n && !mode_ook && sym_ready) taken.push_back(sym_valid ? int'(sym) : -1);
  bit bits [$];
  always @(posedge clk) if (rst_n && bit_take) bits.push_back(bit_in);

  int frames = 0, darks = 0;
  // frame checker: watch led_on from each frame_start
  initial begin
    forever begin
      @(posedge clk); #2;
      if (frame_start && !mode_ook) begin
        int s;
        int lit [$];
        lit.delete();
        s = (taken.size() > 0) ? taken.pop_front() : -2;
        for (int c = 0; c < 64; c++) begin
          if (led_on) lit.push_back(c);
          checks++;
          if (c > 0 && frame_start) begin failures++; $display("frame_start inside a frame"); end
          if (c < 63) begin @(posedge clk); #2; end
          if (mode_ook) break;
        end
        if (mode_ook) continue;
        frames++;
        checks++;
        if (s == -1) begin
          darks++;
          if (lit.size() != 0) begin failures++; $display("dark frame lit"); end
        end else if (lit.size() != 4 || lit[0] != 4 * s || lit[3] != 4 * s + 3) begin
          failures++; $display("symbol %0d lit %p", s, lit);
        end
      end
    end
  end

  initial begin
    mode_ook = 0; sym_valid = 0; sym = 0; bit_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < 60; n++) begin
      sym_valid = (n % 7 != 3);
      sym = 4'($urandom_range(15));
      do @(posedge clk); while (!sym_ready);
      #1;
    end
    sym_valid = 0;
    repeat (70) @(posedge clk);
    // OOK test mode
    mode_ook = 1;
    bits.delete();
    begin
      int run, nbits;
      bit cur;
      nbits = 0;
      fork
        forever begin @(posedge clk); #1; if (bit_take) bit_in = $urandom_range(1); end
      join_none
      repeat (3) @(posedge clk); #2;
      cur = led_on; run = 0;
      for (int c = 0; c < 3000; c++) begin
        @(posedge clk); #2;
        if (led_on != cur) begin
          checks++;
          if (nbits > 0 && run % 100 != 99) begin failures++; $display("OOK run of %0d clocks", run + 1); end
          cur = led_on; run = 0; nbits++;
        end else run++;
      end
      disable fork;
      checks++;
      if (nbits < 5) begin failures++; $display("OOK output hardly toggles"); end
    end
    // back to pulse-position mode
    mode_ook = 0;
    for (int n = 0; n < 10; n++) begin
      sym_valid = 1; sym = 4'(n);
      do @(posedge clk); while (!sym_ready);
      #1;
    end
    sym_valid = 0;
    repeat (140) @(posedge clk);
    checks++;
    if (frames < 70 || darks < 8) begin failures++; $display("frames %0d darks %0d", frames, darks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
