// rs_delay_buffer: the received-symbol buffer of the RS decoder.
//
// Received symbols are written in arrival order into a circular memory; the
// decoder remembers the address of each codeword's first symbol and reads the
// symbols back, position by position, when their error values come out of the
// Chien/Forney stage, so the XOR correction lines up with the right symbol.
// A delay buffer is part of the design; making it an addressed memory (so that
// up to DEPTH/15 codewords can be in flight) is this implementation's choice.
//
// Interface: wr_en writes wr_sym at wr_addr and advances it on the clock edge;
// rd_sym is the word at rd_addr, read combinationally.
module rs_delay_buffer
  import gf16_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  gf_t           wr_sym,
  output logic [AW-1:0] wr_addr,
  input  logic [AW-1:0] rd_addr,
  output gf_t           rd_sym
);
  gf_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_sym;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     wr_addr <= '0;
    else if (wr_en) wr_addr <= wr_addr + 1'b1;
  end

  assign rd_sym = mem[rd_addr];
endmodule
