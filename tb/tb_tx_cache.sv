// tb_tx_cache: random bytes pushed and symbols pulled at random rates through
// tx_cache. The symbol stream must be the bytes' nibbles, high first, in order;
// in_ready must fall after exactly 16 bytes with no reads, and out_valid must
// be low when empty.
module tb_tx_cache;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data;
  logic [3:0] out_sym;
  int checks = 0, failures = 0;
  int exp_q [$];

  tx_cache dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pushed;
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid while empty"); end
    // fill with no reads
    pushed = 0;
    while (in_ready && pushed < 40) begin
      in_valid = 1; in_data = 8'($urandom_range(255));
      exp_q.push_back(in_data[7:4]); exp_q.push_back(in_data[3:0]);
      @(posedge clk); #1; pushed++;
    end
    in_valid = 0;
    checks++;
    if (pushed != 16) begin failures++; $display("full after %0d bytes", pushed); end
    // random traffic
    for (int c = 0; c < 5000; c++) begin
      in_valid = ($urandom_range(2) == 0) && (c < 4800);
      in_data = 8'($urandom_range(255));
      out_ready = $urandom_range(1);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (exp_q.size() == 0 || out_sym != 4'(exp_q[0])) begin
          failures++; $display("got %0d exp %0d", out_sym, exp_q.size() ? exp_q[0] : -1);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
      end
      if (in_valid && in_ready) begin exp_q.push_back(in_data[7:4]); exp_q.push_back(in_data[3:0]); end
      @(posedge clk); #1;
    end
    checks++;
    if (exp_q.size() != 0 || out_valid) begin failures++; $display("%0d symbols left", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
