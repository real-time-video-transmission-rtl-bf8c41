// rs_syndrome: the six syndromes of an RS(15,9) codeword, computed in parallel.
//
// Each lane j (j = 1..6) evaluates the received polynomial at the generator root
// alpha^j by Horner's rule: s_j <= s_j * alpha^j XOR r, one received symbol per
// clock, highest degree first. The multipliers have constant operands and reduce
// to XOR networks. The six-lane structure, the constant finite-field multipliers
// and the output gating by a control signal follow the syndrome circuit of the
// design; here the "control signal" is the end of the codeword, when the lanes
// are copied to the output register.
//
// Interface: in_valid/in_first/in_sym stream received symbols; in_first marks
// the first symbol of a codeword. syn_valid pulses for one clock after the 15th
// symbol, with syn holding S1..S6 until the next codeword completes.
// syn_nonzero is set when any syndrome is non-zero, i.e. the codeword is in error.
module rs_syndrome
  import gf16_pkg::*;
#(
  parameter int unsigned N    = 15,
  parameter int unsigned NSYN = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  input  gf_t  in_sym,
  output logic syn_valid,
  output gf_t  syn [NSYN],
  output logic syn_nonzero
);
  gf_t                  acc [NSYN];
  gf_t                  nxt [NSYN];
  logic [$clog2(N)-1:0] cnt;
  logic                 start;  // this symbol begins a codeword

  // in_first re-aligns the count; without it codewords follow back to back.
  assign start = in_first || (cnt == '0);

  always_comb begin
    for (int j = 0; j < NSYN; j++)
      nxt[j] = (start ? '0 : gf_mul(acc[j], gf_pow_alpha(j + 1))) ^ in_sym;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      syn_valid   <= 1'b0;
      syn_nonzero <= 1'b0;
      for (int j = 0; j < NSYN; j++) begin
        acc[j] <= '0;
        syn[j] <= '0;
      end
    end else begin
      syn_valid <= 1'b0;
      if (in_valid) begin
        for (int j = 0; j < NSYN; j++) acc[j] <= nxt[j];
        if (start) cnt <= 1;
        else       cnt <= cnt + 1'b1;
        if (!start && (cnt == ($clog2(N))'(N - 1))) begin
          syn_valid   <= 1'b1;
          syn_nonzero <= 1'b0;
          for (int j = 0; j < NSYN; j++) begin
            syn[j] <= nxt[j];
            if (nxt[j] != '0) syn_nonzero <= 1'b1;
          end
          cnt <= '0;
        end
      end
    end
  end
endmodule
