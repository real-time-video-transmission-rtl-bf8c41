// tb_prbs_gen: the bit stream of prbs_gen must follow b[n] = b[n-7] XOR b[n-6]
// from seven leading ones, repeat with period 127 and hold while advance is low.
module tb_prbs_gen;
  logic clk = 0, rst_n = 0, advance, bit_out;
  int checks = 0, failures = 0;
  bit ref_seq [300];

  prbs_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int i = 0; i < 7; i++) ref_seq[i] = 1;
    for (int i = 7; i < 300; i++) ref_seq[i] = ref_seq[i-7] ^ ref_seq[i-6];
    advance = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    ones = 0;
    for (int i = 0; i < 300; i++) begin
      checks++;
      if (bit_out != ref_seq[i]) begin failures++; $display("bit %0d got %0d exp %0d", i, bit_out, ref_seq[i]); end
      if (i >= 7 && i < 134) ones += bit_out;
      if (i >= 127) begin
        checks++;
        if (ref_seq[i] != ref_seq[i-127]) begin failures++; $display("period is not 127"); end
      end
      if ($urandom_range(3) == 0) begin
        advance = 0; @(posedge clk); #1;
        checks++;
        if (bit_out != ref_seq[i]) begin failures++; $display("moved without advance"); end
      end
      advance = 1; @(posedge clk); #1; advance = 0;
    end
    checks++;
    if (ones != 64) begin failures++; $display("%0d ones in a period", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
