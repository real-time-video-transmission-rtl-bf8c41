// tb_rs_delay_buffer: random writes (with gaps) wrap the 64-entry buffer
// several times; every symbol must read back at the address it was written to
// until it is overwritten 64 writes later, and the write address must advance
// by one per write.
module tb_rs_delay_buffer;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [3:0] wr_sym, rd_sym;
  logic [5:0] wr_addr, rd_addr;
  int checks = 0, failures = 0;
  logic [3:0] model [64];
  bit written [64];

  rs_delay_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_addr;
    wr_en = 0; wr_sym = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    exp_addr = 0;
    for (int n = 0; n < 2000; n++) begin
      wr_en  = ($urandom_range(3) != 0);
      wr_sym = 4'($urandom_range(15));
      rd_addr = 6'($urandom_range(63));
      #1;
      checks++;
      if (wr_addr != 6'(exp_addr)) begin failures++; $display("wr_addr %0d exp %0d", wr_addr, exp_addr); end
      if (written[rd_addr]) begin
        checks++;
        if (rd_sym != model[rd_addr]) begin failures++; $display("addr %0d got %0d exp %0d", rd_addr, rd_sym, model[rd_addr]); end
      end
      if (wr_en) begin
        model[exp_addr] = wr_sym; written[exp_addr] = 1; exp_addr = (exp_addr + 1) % 64;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
