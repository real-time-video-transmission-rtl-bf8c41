// tb_rs_chien: sigma(x) = prod (1 + X_k x) is built from 0..3 chosen error
// positions and scaled by a random constant, omega is random. rs_chien must
// report is_root exactly at those positions, and odd_val / omg_val must equal
// sigma_odd(X^-1) and X^-1 omega(X^-1) evaluated directly. Each search must
// produce 15 consecutive positions starting the clock after start, and a
// second search started on the last position must follow with no gap.
module tb_rs_chien;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, ready, pos_valid, is_root, last;
  logic [3:0] pos_idx, odd_val, omg_val;
  logic [3:0] sigma [4];
  logic [3:0] omega [3];
  int checks = 0, failures = 0;

  rs_chien dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned sg [4];
  int unsigned om [3];
  bit          isloc [15];

  task automatic make_case(int ne);
    int unsigned sc;
    foreach (isloc[i]) isloc[i] = 0;
    sg = '{1, 0, 0, 0};
    for (int e = 0; e < ne; e++) begin
      int p;
      int unsigned x;
      int unsigned t [4];
      do p = $urandom_range(14); while (isloc[p]);
      isloc[p] = 1;
      x = apow(14 - p);
      t = sg;
      for (int i = 1; i < 4; i++) t[i] ^= mul(sg[i-1], x);
      sg = t;
    end
    sc = $urandom_range(1, 15);
    foreach (sg[i]) sg[i] = mul(sg[i], sc);
    foreach (om[i]) om[i] = $urandom_range(15);
  endtask

  task automatic check_search(int n);
    for (int k = 0; k < 15; k++) begin
      int unsigned xinv, o, w;
      checks++;
      if (!pos_valid || pos_idx != 4'(k) || (last != (k == 14))) begin
        failures++; $display("case %0d: bad position strobe at %0d", n, k);
      end
      xinv = apow(-(14 - k));
      o = 0; w = 0;
      for (int i = 1; i < 4; i += 2) o ^= mul(sg[i], apow(-(14 - k) * i));
      for (int i = 0; i < 3; i++) w ^= mul(om[i], apow(-(14 - k) * (i + 1)));
      checks += 3;
      if (is_root != isloc[k]) begin failures++; $display("case %0d pos %0d root %0d", n, k, is_root); end
      if (odd_val != 4'(o)) begin failures++; $display("case %0d pos %0d odd", n, k); end
      if (omg_val != 4'(w)) begin failures++; $display("case %0d pos %0d omega", n, k); end
      if (k == 14) begin
        // queue the next search on the last position
        make_case(n % 4);
        foreach (sigma[i]) sigma[i] = 4'(sg[i]);
        foreach (omega[i]) omega[i] = 4'(om[i]);
        start = 1;
        checks++;
        if (!ready) begin failures++; $display("not ready on last"); end
      end
      @(posedge clk); #1;
      start = 0;
    end
  endtask

  initial begin
    start = 0;
    foreach (sigma[i]) sigma[i] = 0;
    foreach (omega[i]) omega[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (!ready || pos_valid) begin failures++; $display("not idle after reset"); end
    make_case(3);
    foreach (sigma[i]) sigma[i] = 4'(sg[i]);
    foreach (omega[i]) omega[i] = 4'(om[i]);
    start = 1; @(posedge clk); #1; start = 0;
    for (int n = 1; n <= 300; n++) check_search(n);
    // the queued search runs; let it finish, then the block must go idle
    repeat (15) @(posedge clk); #1;
    checks++;
    if (pos_valid) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
