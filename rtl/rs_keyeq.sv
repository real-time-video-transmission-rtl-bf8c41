// rs_keyeq: key equation solver S(x) sigma(x) = omega(x) mod x^2t for RS(15,9).
//
// The error locator sigma(x) is found with the inversionless Berlekamp-Massey
// algorithm: one iteration per clock for 2t = 6 clocks, each computing the
// discrepancy delta from the syndromes and updating
//   sigma <= gamma*sigma + delta*x*b,
// with b, gamma and the step counter k swapped in when delta != 0 and k >= 0.
// A seventh clock forms omega(x) = S(x) sigma(x) mod x^t (omega has degree
// below t for a correctable pattern). sigma and omega carry the same non-zero
// scale factor, which cancels in the Forney quotient. One iteration per clock
// follows the design description; the choice of the inversionless variant is
// this implementation's, as the description names no algorithm.
//
// Interface: start loads syn (S1..S6) when busy is low. done rises 7 clocks
// later and the result (sigma0..sigmaT, omega0..omega(T-1), deg = register
// length L of the locator, the number of errors it describes; L > T means the
// codeword is uncorrectable) is held until take; busy is high from start until take.
module rs_keyeq
  import gf16_pkg::*;
#(
  parameter int unsigned T = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  gf_t              syn [2*T],
  output logic             busy,
  output logic             done,
  input  logic             take,
  output gf_t              sigma [T+1],
  output gf_t              omega [T],
  output logic [2:0]       deg
);
  typedef enum logic [1:0] {IDLE, ITER, OMEGA, DONE} state_t;

  state_t                   state;
  logic [$clog2(2*T+1)-1:0] r;
  gf_t                      s   [2*T];
  gf_t                      lam [T+1];
  gf_t                      b   [T+1];
  gf_t                      gamma;
  int                       k;      // Berlekamp-Massey step counter, may go negative
  logic [2:0]               len;    // register length L of the locator
  gf_t                      delta;

  // discrepancy of iteration r: sum over i of lam_i * S_(r+1-i)
  always_comb begin
    delta = '0;
    for (int i = 0; i <= T; i++)
      if (int'(r) - i >= 0 && int'(r) - i < 2 * T)
        delta ^= gf_mul(lam[i], s[int'(r) - i]);
  end

  assign busy = (state != IDLE);
  assign done = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      r     <= '0;
      gamma <= 4'd1;
      k     <= 0;
      len   <= '0;
      deg   <= '0;
      for (int i = 0; i < 2 * T; i++) s[i] <= '0;
      for (int i = 0; i <= T; i++) begin
        lam[i]   <= '0;
        b[i]     <= '0;
        sigma[i] <= '0;
      end
      for (int i = 0; i < T; i++) omega[i] <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          for (int i = 0; i < 2 * T; i++) s[i] <= syn[i];
          for (int i = 0; i <= T; i++) begin
            lam[i] <= (i == 0) ? 4'd1 : 4'd0;
            b[i]   <= (i == 0) ? 4'd1 : 4'd0;
          end
          gamma <= 4'd1;
          k     <= 0;
          len   <= '0;
          r     <= '0;
          state <= ITER;
        end
        ITER: begin
          for (int i = 0; i <= T; i++)
            lam[i] <= gf_mul(gamma, lam[i]) ^ ((i > 0) ? gf_mul(delta, b[i-1]) : '0);
          if (delta != '0 && k >= 0) begin
            for (int i = 0; i <= T; i++) b[i] <= lam[i];
            gamma <= delta;
            k     <= -k - 1;
            len   <= 3'(int'(r) + 1 - int'(len));
          end else begin
            for (int i = 0; i <= T; i++) b[i] <= (i > 0) ? b[i-1] : '0;
            k <= k + 1;
          end
          r <= r + 1'b1;
          if (int'(r) == 2 * T - 1) state <= OMEGA;
        end
        OMEGA: begin
          for (int i = 0; i < T; i++) begin
            gf_t acc;
            acc = '0;
            for (int j = 0; j <= i; j++) acc ^= gf_mul(lam[j], s[i-j]);
            omega[i] <= acc;
          end
          for (int i = 0; i <= T; i++) sigma[i] <= lam[i];
          deg <= len;
          state <= DONE;
        end
        DONE: if (take) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
