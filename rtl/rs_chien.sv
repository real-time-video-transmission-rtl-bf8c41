// rs_chien: Chien search for RS(15,9), one codeword position per clock.
//
// Register c_j holds sigma_j * alpha^(j*(m+1)) at step m and is multiplied by
// the constant alpha^j every clock, so the sum of the registers is
// sigma(alpha^-i) for position i = 14 - m: positions are visited highest degree
// first, in the order the symbols were received. A zero sum marks an error
// location. The odd-indexed registers give sigma_odd(X^-1) = X^-1 sigma'(X^-1),
// and a second register bank with multipliers alpha^(j+1) gives
// X^-1 omega(X^-1); both feed the Forney stage. The register-and-constant-
// multiplier loop and the sum block follow the Chien search circuit of the
// design; evaluating omega alongside is this implementation's arrangement.
//
// Interface: start loads sigma0..sigmaT and omega0..omega(T-1) when ready is
// high (idle, or on the last position of the previous search). The next clock
// begins 15 consecutive cycles with pos_valid high; pos_idx counts 0..14 and
// last marks the 15th.
module rs_chien
  import gf16_pkg::*;
#(
  parameter int unsigned N = 15,
  parameter int unsigned T = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  ready,
  input  gf_t                   sigma [T+1],
  input  gf_t                   omega [T],
  output logic                  pos_valid,
  output logic [$clog2(N)-1:0]  pos_idx,
  output logic                  is_root,
  output gf_t                   odd_val,
  output gf_t                   omg_val,
  output logic                  last
);
  gf_t  c [T+1];
  gf_t  d [T];
  gf_t  sum;

  always_comb begin
    sum     = '0;
    odd_val = '0;
    omg_val = '0;
    for (int j = 0; j <= T; j++) begin
      sum ^= c[j];
      if (j % 2 == 1) odd_val ^= c[j];
    end
    for (int j = 0; j < T; j++) omg_val ^= d[j];
  end

  assign is_root = pos_valid && (sum == '0);
  assign last    = pos_valid && (pos_idx == ($clog2(N))'(N - 1));
  assign ready   = !pos_valid || last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_valid <= 1'b0;
      pos_idx   <= '0;
      for (int j = 0; j <= T; j++) c[j] <= '0;
      for (int j = 0; j < T; j++)  d[j] <= '0;
    end else if (start && ready) begin
      pos_valid <= 1'b1;
      pos_idx   <= '0;
      for (int j = 0; j <= T; j++) c[j] <= gf_mul(sigma[j], gf_pow_alpha(j));
      for (int j = 0; j < T; j++)  d[j] <= gf_mul(omega[j], gf_pow_alpha(j + 1));
    end else if (pos_valid) begin
      pos_valid <= !last;
      pos_idx   <= pos_idx + 1'b1;
      for (int j = 0; j <= T; j++) c[j] <= gf_mul(c[j], gf_pow_alpha(j));
      for (int j = 0; j < T; j++)  d[j] <= gf_mul(d[j], gf_pow_alpha(j + 1));
    end
  end
endmodule
