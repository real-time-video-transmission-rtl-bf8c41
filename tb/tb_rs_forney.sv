// tb_rs_forney: all 16x16x2 input combinations of rs_forney against
// omega * odd^-1 computed with log/antilog tables, and zero when not a root.
module tb_rs_forney;
  import rs_ref_pkg::*;
  logic is_root;
  logic [3:0] odd_val, omg_val, err_val;
  int checks = 0, failures = 0;

  rs_forney dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int o = 1; o < 16; o++)
        for (int w = 0; w < 16; w++) begin
          int unsigned exp;
          is_root = r[0]; odd_val = 4'(o); omg_val = 4'(w);
          #1;
          exp = r ? mul(w, inv(o)) : 0;
          checks++;
          if (err_val != 4'(exp)) begin
            failures++; $display("root=%0d odd=%0d omg=%0d got %0d exp %0d", r, o, w, err_val, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
