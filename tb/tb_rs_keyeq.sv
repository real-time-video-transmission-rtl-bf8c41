// tb_rs_keyeq: syndromes of codewords with 0..3 errors at known positions go
// into rs_keyeq. The locator degree must equal the number of errors, sigma
// must vanish at every X^-1 of an error position and nowhere else, omega/sigma'
// must give the injected error values (Forney), and done must rise 8 clocks
// after start (load, 6 iterations, omega).
module tb_rs_keyeq;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, take;
  logic [3:0] syn [6];
  logic [3:0] sigma [4];
  logic [3:0] omega [3];
  logic [2:0] deg;
  int checks = 0, failures = 0;

  rs_keyeq dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned eval(input logic [3:0] p [], int unsigned x);
    int unsigned acc, xp;
    acc = 0; xp = 1;
    foreach (p[i]) begin acc ^= mul(p[i], xp); xp = mul(xp, x); end
    return acc;
  endfunction

  initial begin
    int unsigned msg [9];
    int unsigned cw [15];
    int unsigned ev [15];
    logic [3:0] sg [];
    logic [3:0] om [];
    start = 0; take = 0;
    foreach (syn[i]) syn[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 400; n++) begin
      int ne, lat;
      foreach (msg[i]) msg[i] = $urandom_range(15);
      encode(msg, cw);
      foreach (ev[i]) ev[i] = 0;
      ne = n % 4;
      for (int e = 0; e < ne; e++) begin
        int p;
        do p = $urandom_range(14); while (ev[p] != 0);
        ev[p] = $urandom_range(1, 15);
        cw[p] ^= ev[p];
      end
      for (int j = 1; j <= 6; j++) syn[j-1] = 4'(syndrome(cw, j));
      start = 1; @(posedge clk); #1; start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 8) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (deg != 3'(ne)) begin failures++; $display("word %0d deg %0d exp %0d", n, deg, ne); end
      sg = new[4]; om = new[3];
      foreach (sigma[i]) sg[i] = sigma[i];
      foreach (omega[i]) om[i] = omega[i];
      for (int k = 0; k < 15; k++) begin
        // symbol k sits at degree 14-k: locator X = alpha^(14-k)
        int unsigned xinv, s;
        xinv = apow(-(14 - k));
        s = eval(sg, xinv);
        checks++;
        if ((s == 0) != (ev[k] != 0)) begin
          failures++; $display("word %0d pos %0d: sigma=%0d err=%0d", n, k, s, ev[k]);
        end
        if (ev[k] != 0) begin
          // Forney with b=1: e = omega(X^-1) / sigma'(X^-1)
          int unsigned dsig, e;
          dsig = 0;
          for (int i = 1; i < 4; i += 2) dsig ^= mul(sg[i], apow(-(14 - k) * (i - 1)));
          e = mul(eval(om, xinv), inv(dsig));
          checks++;
          if (e != ev[k]) begin failures++; $display("word %0d pos %0d value %0d exp %0d", n, k, e, ev[k]); end
        end
      end
      checks++;
      if (!busy) begin failures++; $display("busy low while holding result"); end
      take = 1; @(posedge clk); #1; take = 0;
      checks++;
      if (busy) begin failures++; $display("busy after take"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
