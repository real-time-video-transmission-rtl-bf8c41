// rx_unpack: rebuilds video bytes from decoded RS message symbols.
//
// Parity symbols are dropped; message symbols are paired, high nibble first,
// into bytes, mirroring the transmitter's cache. Pairing runs on across
// codeword boundaries (9 symbols per codeword, so a byte may straddle two) and
// restarts on resync. This reassembly is this implementation's counterpart of
// its own transmit-side packing; the document shows only decoder to display.
//
// Interface: in_valid/in_is_msg/in_sym from the decoder; out_valid/out_data
// pulse one clock after the low nibble arrives.
module rx_unpack (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       resync,
  input  logic       in_valid,
  input  logic       in_is_msg,
  input  logic [3:0] in_sym,
  output logic       out_valid,
  output logic [7:0] out_data
);
  logic       have_hi;
  logic [3:0] hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_hi <= 1'b0; hi <= '0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      if (resync) begin
        have_hi <= 1'b0;
      end else if (in_valid && in_is_msg) begin
        if (have_hi) begin
          out_valid <= 1'b1;
          out_data  <= {hi, in_sym};
          have_hi   <= 1'b0;
        end else begin
          hi      <= in_sym;
          have_hi <= 1'b1;
        end
      end
    end
  end
endmodule
