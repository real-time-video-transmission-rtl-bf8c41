// tx_cache: the transmitter's register cache between the video source and the
// RS encoder.
//
// A DEPTH-entry byte FIFO (circular buffer with read and write pointers and an
// occupancy count) absorbs the bursty video bytes; its output side hands each
// byte to the encoder as two 4-bit symbols, high nibble first, because the
// code works on GF(16) symbols. The document only names a register cache; the
// FIFO form, depth and nibble order are this implementation's.
//
// Interface: in_valid/in_ready/in_data take bytes; out_valid/out_ready/out_sym
// give symbols. A byte written on one clock is visible at the output on the next.
module tx_cache #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [3:0] out_sym,
  input  logic       out_ready
);
  logic [7:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          lo_half;   // the high nibble of the head byte has been sent
  logic          push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_sym   = lo_half ? mem[rp][3:0] : mem[rp][7:4];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready && lo_half;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; lo_half <= 1'b0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      if (out_valid && out_ready) lo_half <= !lo_half;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
