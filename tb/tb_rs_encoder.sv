// tb_rs_encoder: random messages through rs_encoder, with random output stalls.
// Each codeword is compared with a long-division reference and its six
// syndromes must be zero; with no stalls a codeword must take exactly 15 clocks
// and the message must be taken on 9 of them.
module tb_rs_encoder;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_first;
  logic [3:0] in_sym, out_sym;
  int checks = 0, failures = 0;

  rs_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned msg [9];
  int unsigned cw [15];
  int unsigned got [15];

  task automatic run_word(bit stalls, output int cycles);
    int mi, oi;
    mi = 0; oi = 0; cycles = 0;
    foreach (msg[i]) msg[i] = $urandom_range(15);
    encode(msg, cw);
    while (oi < 15) begin
      in_valid  = (mi < 9) && (!stalls || $urandom_range(3) != 0);
      in_sym    = (mi < 9) ? 4'(msg[mi]) : 4'($urandom_range(15));
      out_ready = !stalls || ($urandom_range(2) != 0);
      #1;
      if (out_valid && out_ready) begin
        if ((oi == 0) != out_first) begin
          failures++; $display("out_first wrong at symbol %0d", oi);
        end
        got[oi] = out_sym;
        oi++;
      end
      if (in_valid && in_ready) mi++;
      @(posedge clk); #1;
      cycles++;
    end
    in_valid = 0;
    for (int i = 0; i < 15; i++) begin
      checks++;
      if (got[i] != cw[i]) begin
        failures++; $display("symbol %0d: got %0d expected %0d", i, got[i], cw[i]);
      end
    end
    for (int j = 1; j <= 6; j++) begin
      checks++;
      if (syndrome(got, j) != 0) begin failures++; $display("nonzero syndrome S%0d", j); end
    end
  endtask

  initial begin
    int cyc;
    in_valid = 0; in_sym = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 200; n++) run_word(0, cyc);
    checks++;
    if (cyc != 15) begin failures++; $display("codeword took %0d clocks", cyc); end
    for (int n = 0; n < 200; n++) run_word(1, cyc);
    // all-zero and all-ones messages
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
