// prbs_gen: pseudo-random bit source for the link's eye-diagram test mode.
//
// A 7-bit Fibonacci LFSR with polynomial x^7 + x^6 + 1 (maximal length, period
// 127), seeded with all ones at reset. bit_out is the current bit; advance
// steps to the next one on the clock edge. The design asks only for a
// pseudo-random test signal; the polynomial and seed are this implementation's.
module prbs_gen #(
  parameter int unsigned ORDER = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic advance,
  output logic bit_out
);
  logic [ORDER-1:0] sr;

  assign bit_out = sr[ORDER-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sr <= '1;
    else if (advance) sr <= {sr[ORDER-2:0], sr[ORDER-1] ^ sr[ORDER-2]};
  end
endmodule
