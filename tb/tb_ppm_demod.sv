// tb_ppm_demod: ADC sample streams of 16-slot, 4-sample-per-slot frames with
// amplitude noise go into ppm_demod. Lit frames must decide the sent slot,
// dark frames must give no_peak and no symbol, sym_first must mark the first
// symbol after sync, and each decision must come exactly one sample after the
// frame's last sample. The sequence includes slot 15 followed by slot 0 (a flat
// window-sum top split across two frames) and a re-sync with no gap.
module tb_ppm_demod;
  logic clk = 0, rst_n = 0;
  logic smp_valid, sync, sym_valid, sym_first, no_peak;
  logic [7:0] smp;
  logic [9:0] peak_min, peak;
  logic [3:0] sym;
  int checks = 0, failures = 0;
  int n_lit = 0, n_dark = 0, n_wrap = 0;

  ppm_demod dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int s; bit first; longint due; } exp_t;
  exp_t q [$];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #2;
    if (sym_valid || no_peak) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("decision without a frame"); end
      else begin
        e = q.pop_front();
        if (cyc != e.due) begin failures++; $display("decision at %0d due %0d", cyc, e.due); end
        checks++;
        if (e.s < 0) begin
          if (sym_valid || !no_peak) begin failures++; $display("dark frame gave symbol %0d", sym); end
        end else begin
          if (!sym_valid || sym != 4'(e.s) || sym_first != e.first) begin
            failures++; $display("sent %0d got valid=%0d sym=%0d first=%0d/%0d", e.s, sym_valid, sym, sym_first, e.first);
          end
        end
      end
    end
  end

  // one frame: s = -1 for a dark frame
  task automatic send_frame(int s, bit do_sync, bit first, int noise);
    exp_t e;
    for (int c = 0; c < 64; c++) begin
      int v;
      v = ((s >= 0) && (c / 4 == s)) ? 190 : 35;
      v += $urandom_range(2 * noise) - noise;
      smp_valid = 1; smp = 8'(v); sync = do_sync && (c == 0);
      if (c == 63) begin e.s = s; e.first = first; e.due = cyc + 2; q.push_back(e); end
      @(posedge clk); #1;
    end
    sync = 0;
  endtask

  initial begin
    int prev;
    smp_valid = 0; smp = 0; sync = 0; peak_min = 10'd480;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // samples before sync are ignored
    for (int c = 0; c < 37; c++) begin smp_valid = 1; smp = 8'($urandom_range(255)); @(posedge clk); #1; end
    send_frame(5, 1, 1, 0);
    prev = 5;
    for (int n = 0; n < 600; n++) begin
      int s;
      if (n % 11 == 10) s = -1;
      else if (n % 13 == 0) s = 15;
      else if (prev == 15) s = 0;
      else s = $urandom_range(15);
      if (prev == 15 && s == 0) n_wrap++;
      if (s < 0) n_dark++; else n_lit++;
      // a gap in the sample strobe now and then
      if (n % 17 == 5) begin smp_valid = 0; repeat (3) @(posedge clk); #1; foreach (q[i]) q[i].due += 3; end
      send_frame(s, n == 300, n == 300, (n < 300) ? 0 : 12);
      prev = s;
    end
    smp_valid = 1; smp = 35; @(posedge clk); #1; smp_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_wrap == 0 || n_dark == 0) begin
      failures++; $display("left %0d, wraps %0d, darks %0d", q.size(), n_wrap, n_dark);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
