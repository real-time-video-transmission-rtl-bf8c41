// tb_rx_unpack: decoded symbol streams (9 message + 6 parity per codeword,
// with gaps) into rx_unpack. Bytes must be consecutive message-symbol pairs,
// high nibble first, across codeword boundaries, parity must be dropped, and
// resync must restart the pairing.
module tb_rx_unpack;
  logic clk = 0, rst_n = 0;
  logic resync, in_valid, in_is_msg, out_valid;
  logic [3:0] in_sym;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int msg_q [$];
  int nbytes = 0;

  rx_unpack dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (out_valid) begin
      int e;
      checks++;
      nbytes++;
      if (msg_q.size() < 2) begin failures++; $display("byte without two symbols"); end
      else begin
        e = (msg_q[0] << 4) | msg_q[1];
        void'(msg_q.pop_front()); void'(msg_q.pop_front());
        if (out_data != 8'(e)) begin failures++; $display("got %02h exp %02h", out_data, e); end
      end
    end
  end

  initial begin
    resync = 0; in_valid = 0; in_is_msg = 0; in_sym = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int w = 0; w < 200; w++) begin
      if (w == 101) begin
        // a stray symbol, then resync: the pairing must restart
        in_valid = 1; in_is_msg = 1; in_sym = 4'hA; msg_q.push_back(4'hA); @(posedge clk); #1;
        in_sym = 4'h5; msg_q.push_back(4'h5); @(posedge clk); #1;
        in_valid = 0; @(posedge clk); #1;
        resync = 1; msg_q.delete(); @(posedge clk); #1; resync = 0;
      end
      for (int k = 0; k < 15; k++) begin
        if ($urandom_range(3) == 0) begin in_valid = 0; @(posedge clk); #1; end
        in_valid = 1; in_is_msg = (k < 9); in_sym = 4'($urandom_range(15));
        if (k < 9) msg_q.push_back(in_sym);
        @(posedge clk); #1;
      end
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nbytes != 900 || msg_q.size() != 1) begin failures++; $display("bytes %0d left %0d", nbytes, msg_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
