// tb_rs_syndrome: random words (codewords with 0..4 injected errors and fully
// random words) streamed into rs_syndrome, back to back and with gaps; S1..S6
// are compared with direct polynomial evaluation, syn_nonzero with "any S != 0",
// and syn_valid must come exactly one clock after the 15th symbol.
module tb_rs_syndrome;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, syn_valid, syn_nonzero;
  logic [3:0] in_sym;
  logic [3:0] syn [6];
  int checks = 0, failures = 0;

  rs_syndrome dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned msg [9];
  int unsigned cw [15];

  initial begin
    in_valid = 0; in_first = 0; in_sym = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 300; n++) begin
      bit gaps, any;
      int ne;
      gaps = (n % 3 == 2);
      foreach (msg[i]) msg[i] = $urandom_range(15);
      encode(msg, cw);
      ne = n % 5;
      for (int e = 0; e < ne; e++) cw[$urandom_range(14)] ^= $urandom_range(1, 15);
      if (n % 7 == 6) foreach (cw[i]) cw[i] = $urandom_range(15);
      for (int k = 0; k < 15; k++) begin
        while (gaps && $urandom_range(1) == 0) begin
          in_valid = 0; @(posedge clk); #1;
          checks++;
          if (syn_valid && k != 0) begin failures++; $display("early syn_valid"); end
        end
        in_valid = 1; in_first = (k == 0) && (n % 2 == 0); in_sym = 4'(cw[k]);
        @(posedge clk); #1;
      end
      in_valid = 0; in_first = 0;
      checks++;
      if (!syn_valid) begin failures++; $display("no syn_valid after word %0d", n); end
      any = 0;
      for (int j = 1; j <= 6; j++) begin
        int unsigned s;
        s = syndrome(cw, j);
        any |= (s != 0);
        checks++;
        if (syn[j-1] != 4'(s)) begin
          failures++; $display("word %0d S%0d got %0d exp %0d", n, j, syn[j-1], s);
        end
      end
      checks++;
      if (syn_nonzero != any) begin failures++; $display("syn_nonzero wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
