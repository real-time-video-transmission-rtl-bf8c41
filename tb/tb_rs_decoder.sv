// tb_rs_decoder: streams of RS(15,9) codewords through rs_decoder, back to back
// at one symbol per clock and with random gaps. Codewords carry 0..3 random
// symbol errors (must come out exactly as sent, with out_corrected on exactly
// the error positions) or 4..6 errors (must either be flagged with blk_fail or
// come out as some valid codeword). Also checked: out_first / out_is_msg /
// blk_done framing, no overrun at full rate, and a fixed latency of 10 clocks
// from the last received symbol to the first corrected one.
module tb_rs_decoder;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_first;
  logic [3:0] in_sym, out_sym;
  logic out_valid, out_first, out_is_msg, out_corrected, blk_done, blk_fail, overrun;
  int checks = 0, failures = 0;
  int n_fail_flag = 0, n_corrected = 0;

  rs_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int unsigned sent [15];
    int unsigned rx [15];
    int          nerr;
    longint      last_in;
  } word_t;
  word_t q [$];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // output checker
  initial begin
    word_t w;
    int unsigned got [15];
    int k;
    k = 0;
    forever begin
      @(posedge clk); #2;
      if (out_valid) begin
        if (k == 0) begin
          if (q.size() == 0) begin failures++; $display("unexpected output"); continue; end
          w = q.pop_front();
          checks++;
          if (cyc - w.last_in != 11 - 1) begin failures++; $display("latency %0d", cyc - w.last_in); end
        end
        checks++;
        if (out_first != (k == 0) || out_is_msg != (k < 9) || blk_done != (k == 14)) begin
          failures++; $display("framing flags wrong at %0d", k);
        end
        got[k] = out_sym;
        if (w.nerr <= 3) begin
          checks += 2;
          if (out_sym != 4'(w.sent[k])) begin failures++; $display("pos %0d got %0d exp %0d (nerr %0d)", k, out_sym, w.sent[k], w.nerr); end
          if (out_corrected != (w.sent[k] != w.rx[k])) begin failures++; $display("out_corrected wrong at %0d", k); end
          if (out_corrected) n_corrected++;
        end
        if (k == 14) begin
          checks++;
          if (w.nerr <= 3) begin
            if (blk_fail) begin failures++; $display("blk_fail on correctable word"); end
          end else if (blk_fail) begin
            n_fail_flag++;
          end else begin
            bit bad;
            bad = 0;
            for (int j = 1; j <= 6; j++) if (syndrome(got, j) != 0) bad = 1;
            if (bad) begin failures++; $display("unflagged output is not a codeword"); end
          end
          k = 0;
        end else k++;
      end
    end
  end

  task automatic send_words(int count, bit gaps);
    for (int n = 0; n < count; n++) begin
      word_t w;
      int unsigned msg [9];
      bit hit [15];
      foreach (msg[i]) msg[i] = $urandom_range(15);
      encode(msg, w.sent);
      w.rx = w.sent;
      w.nerr = (n % 10 < 8) ? (n % 4) : 4 + (n % 3);
      foreach (hit[i]) hit[i] = 0;
      for (int e = 0; e < w.nerr; e++) begin
        int p;
        do p = $urandom_range(14); while (hit[p]);
        hit[p] = 1;
        w.rx[p] ^= $urandom_range(1, 15);
      end
      for (int k = 0; k < 15; k++) begin
        while (gaps && $urandom_range(2) == 0) begin in_valid = 0; @(posedge clk); #1; end
        in_valid = 1; in_first = (k == 0); in_sym = 4'(w.rx[k]);
        if (k == 14) begin w.last_in = cyc + 1; q.push_back(w); end
        @(posedge clk); #1;
      end
    end
    in_valid = 0; in_first = 0;
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_sym = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    send_words(300, 0);
    send_words(200, 1);
    repeat (60) @(posedge clk);
    #1;
    checks += 4;
    if (q.size() != 0) begin failures++; $display("%0d words never came out", q.size()); end
    if (overrun) begin failures++; $display("overrun"); end
    if (n_fail_flag == 0) begin failures++; $display("no uncorrectable word was flagged"); end
    if (n_corrected == 0) begin failures++; $display("nothing was corrected"); end
    $display("flagged %0d uncorrectable words, corrected %0d symbols", n_fail_flag, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
