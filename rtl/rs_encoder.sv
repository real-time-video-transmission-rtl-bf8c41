// rs_encoder: systematic RS(15,9) encoder over GF(16).
//
// A codeword is the 9 message symbols followed by the 6 parity symbols
// x^6 u(x) mod g(x). The parity is formed by the classic division shift
// register: six 4-bit registers R1..R6 with constant multipliers by the
// generator coefficients g0..g5 and XOR adders between them. While a message
// symbol enters, the feedback (input XOR last register) is multiplied into every
// stage; after the 9th symbol the feedback is forced to zero and the registers
// shift out as parity. The structure follows the encoder diagram of the design;
// the valid/ready handshake and the symbol order (highest degree first) are
// choices of this implementation.
//
// Interface: in_valid/in_ready/in_sym take message symbols, out_valid/out_ready/
// out_sym give code symbols, out_first marks the first symbol of a codeword.
// Timing: the output is combinational from the input during the 9 message
// symbols (no added latency); the 6 parity symbols follow on the next 6
// accepted output cycles, during which in_ready is low. One symbol per clock.
module rs_encoder
  import gf16_pkg::*;
#(
  parameter int unsigned N = 15,
  parameter int unsigned K = 9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  gf_t  in_sym,
  output logic out_valid,
  input  logic out_ready,
  output gf_t  out_sym,
  output logic out_first
);
  localparam int unsigned P = N - K;

  gf_t               r [P];        // r[0] = R1 ... r[P-1] = R2t
  logic [$clog2(N)-1:0] cnt;       // position in the codeword
  logic              in_msg;
  gf_t               fb;
  logic              fire;

  assign in_msg    = (cnt < ($clog2(N))'(K));
  assign in_ready  = in_msg && out_ready;
  assign out_valid = in_msg ? in_valid : 1'b1;
  assign out_sym   = in_msg ? in_sym : r[P-1];
  assign out_first = (cnt == 0);
  assign fire      = out_valid && out_ready;
  assign fb        = in_msg ? (in_sym ^ r[P-1]) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < P; i++) r[i] <= '0;
    end else if (fire) begin
      r[0] <= gf_mul(fb, GEN_POLY[0]);
      for (int i = 1; i < P; i++) r[i] <= r[i-1] ^ gf_mul(fb, GEN_POLY[i]);
      cnt <= (cnt == ($clog2(N))'(N - 1)) ? '0 : cnt + 1'b1;
    end
  end

  // A message symbol is never dropped: when the encoder takes it, it is also sent.
  a_msg_passes : assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready) |-> fire);
endmodule
