// rs_decoder: RS(15,9) decoder over GF(16), correcting up to 3 symbol errors.
//
// Four circuits in a three-stage pipeline, as in the decoder of the design:
//   1. rs_syndrome computes S1..S6 while the codeword arrives, and every symbol
//      is also written to rs_delay_buffer;
//   2. rs_keyeq solves the key equation (7 clocks after the last symbol);
//   3. rs_chien walks the 15 positions, rs_forney gives each error value, and
//      the value is XORed onto the symbol read back from the delay buffer.
// Each stage needs at most 15 clocks per codeword, so codewords may arrive
// back to back at one symbol per clock. A codeword is declared uncorrectable
// when the locator's register length exceeds t, when the number of Chien
// roots differs from it, or when the syndromes are non-zero but no locator was
// found; its symbols still leave,
// with blk_fail raised on the last one. Failure handling and the stage
// handshakes are this implementation's choices.
//
// Interface: in_valid/in_first/in_sym take received symbols, highest degree
// first; in_first realigns the codeword count. Outputs are registered: out_valid
// with out_sym (corrected), out_first, out_is_msg (one of the 9 message symbols),
// out_corrected; blk_done on the 15th symbol with blk_fail. overrun is a sticky
// flag set if a stage was still busy when the previous one finished.
// Latency: the first corrected symbol leaves 10 clocks after the last received
// symbol of its codeword.
module rs_decoder
  import gf16_pkg::*;
#(
  parameter int unsigned N = 15,
  parameter int unsigned K = 9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  input  gf_t  in_sym,
  output logic out_valid,
  output gf_t  out_sym,
  output logic out_first,
  output logic out_is_msg,
  output logic out_corrected,
  output logic blk_done,
  output logic blk_fail,
  output logic overrun
);
  localparam int unsigned T  = (N - K) / 2;
  localparam int unsigned AW = 6;
  localparam int unsigned CW = $clog2(N);

  // ---- stage 1: syndromes and buffer write ----
  logic            syn_valid, syn_nz;
  gf_t             syn [2*T];
  logic [AW-1:0]   wr_addr, base_in, base_s1;
  logic [CW-1:0]   cnt;
  logic            in_start;

  assign in_start = in_first || (cnt == '0);

  rs_syndrome #(.N(N), .NSYN(2*T)) u_syn (
    .clk, .rst_n, .in_valid, .in_first, .in_sym,
    .syn_valid, .syn, .syn_nonzero(syn_nz)
  );

  logic [AW-1:0] rd_addr;
  gf_t           rd_sym;
  rs_delay_buffer #(.DEPTH(1 << AW)) u_buf (
    .clk, .rst_n, .wr_en(in_valid), .wr_sym(in_sym), .wr_addr, .rd_addr, .rd_sym
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      base_in <= '0;
      base_s1 <= '0;
    end else if (in_valid) begin
      if (in_start) begin
        base_in <= wr_addr;
        cnt     <= 1;
      end else begin
        cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CW'(N - 1)) base_s1 <= base_in;  // codeword complete
      end
    end
  end

  // ---- stage 2: key equation ----
  logic          ke_busy, ke_done, ke_take;
  gf_t           sigma [T+1];
  gf_t           omega [T];
  logic [2:0]    ke_deg;
  logic [AW-1:0] base_s2;
  logic          nz_s2;

  rs_keyeq #(.T(T)) u_ke (
    .clk, .rst_n, .start(syn_valid), .syn, .busy(ke_busy), .done(ke_done),
    .take(ke_take), .sigma, .omega, .deg(ke_deg)
  );

  // ---- stage 3: Chien search, Forney, correction ----
  logic            ch_ready, pos_valid, is_root, ch_last;
  logic [CW-1:0]   pos_idx;
  gf_t             odd_val, omg_val, err_val;
  logic [AW-1:0]   base_s3;
  logic [2:0]      deg_s3;
  logic            nz_s3;
  logic [2:0]      roots;

  assign ke_take = ke_done && ch_ready;

  rs_chien #(.N(N), .T(T)) u_chien (
    .clk, .rst_n, .start(ke_take), .ready(ch_ready), .sigma, .omega,
    .pos_valid, .pos_idx, .is_root, .odd_val, .omg_val, .last(ch_last)
  );

  rs_forney u_forney (.is_root, .odd_val, .omg_val, .err_val);

  assign rd_addr = base_s3 + AW'(pos_idx);

  logic [2:0] roots_total;
  assign roots_total = roots + 3'(is_root);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_s2 <= '0; nz_s2 <= 1'b0;
      base_s3 <= '0; nz_s3 <= 1'b0; deg_s3 <= '0;
      roots   <= '0;
      overrun <= 1'b0;
      out_valid <= 1'b0; out_sym <= '0; out_first <= 1'b0; out_is_msg <= 1'b0;
      out_corrected <= 1'b0; blk_done <= 1'b0; blk_fail <= 1'b0;
    end else begin
      if (syn_valid) begin
        if (ke_busy) overrun <= 1'b1;
        base_s2 <= base_s1;
        nz_s2   <= syn_nz;
      end
      if (ke_take) begin
        base_s3 <= base_s2;
        nz_s3   <= nz_s2;
        deg_s3  <= ke_deg;
      end
      if (pos_valid) roots <= ch_last ? '0 : roots_total;

      out_valid     <= pos_valid;
      out_sym       <= rd_sym ^ err_val;
      out_first     <= pos_valid && (pos_idx == 0);
      out_is_msg    <= pos_valid && (pos_idx < CW'(K));
      out_corrected <= pos_valid && (err_val != '0);
      blk_done      <= ch_last;
      blk_fail      <= ch_last && ((deg_s3 > 3'(T)) || (3'(roots_total) != deg_s3) || (nz_s3 && deg_s3 == 0));
    end
  end

  // The key-equation stage must be free whenever a codeword's syndromes are ready.
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n) syn_valid |-> !ke_busy);
endmodule
