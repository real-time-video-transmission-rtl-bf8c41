// ppm_demod: pulse position decision on the ADC samples of the receiver.
//
// Per sample (one per clock when smp_valid is high):
//   memory 1 - the last SAMPLES_PER_SLOT samples of the current frame; their
//              sum A is the energy of one slot-wide window ending at this
//              sample (the window is cleared at each frame start, so a frame
//              is judged on its own samples only);
//   memory 2 - the previous A, its time in the frame and whether A was last
//              rising; the previous A is a local maximum when A had risen to it
//              and the new A is not larger, or when it is the frame's last
//              (which has no successor inside the frame);
//   memory 3 - the largest local maximum of the frame and its time.
// When the last sample of a frame has been judged, the pulse position is the
// time of the largest maximum divided by SAMPLES_PER_SLOT (the window sum of a
// lit slot peaks on the slot's last sample), and memory 3 is cleared. A maximum
// counts only if it exceeds peak_min; a frame without one is reported with
// no_peak and no symbol, which is how an idle (dark) frame is skipped.
// The sample summing, the local-maximum test and the three memories follow
// the pulse position decision flow of the design. Merging its two comparison
// branches into one test, clearing the window at every frame start, the
// threshold and the frame counter are this implementation's.
//
// Interface: sync (with smp_valid) marks the first sample of a frame and clears
// the memories; frames then follow every SLOTS*SAMPLES_PER_SLOT samples.
// sym_valid pulses one sample after the frame's last sample; sym_first marks
// the first symbol after sync; peak is the winning window sum.
module ppm_demod #(
  parameter int unsigned SLOTS            = 16,
  parameter int unsigned SAMPLES_PER_SLOT = 4,
  parameter int unsigned DW               = 8,
  localparam int unsigned AW   = $clog2(SAMPLES_PER_SLOT * ((1 << DW) - 1) + 1),
  localparam int unsigned SW   = $clog2(SLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          smp_valid,
  input  logic [DW-1:0] smp,
  input  logic          sync,
  input  logic [AW-1:0] peak_min,
  output logic          sym_valid,
  output logic [SW-1:0] sym,
  output logic          sym_first,
  output logic [AW-1:0] peak,
  output logic          no_peak
);
  localparam int unsigned FRAME = SLOTS * SAMPLES_PER_SLOT;
  localparam int unsigned TW    = $clog2(FRAME);

  // memory 1
  logic [DW-1:0] win [SAMPLES_PER_SLOT-1];
  // memory 2
  logic [AW-1:0] a_prev;
  logic [TW-1:0] t_prev;
  logic          prev_ok, up;
  // memory 3
  logic [AW-1:0] best_val;
  logic [TW-1:0] best_t;
  logic          found;

  logic [TW-1:0] t_cur;     // time of the current sample in its frame
  logic [TW-1:0] t_run;     // running frame counter
  logic          synced, first_pending;
  logic [AW-1:0] a_cur;
  logic          cand;
  logic          take_cand;
  logic [AW-1:0] best_nxt;
  logic [TW-1:0] best_t_nxt;
  logic          found_nxt;
  logic          close;

  assign t_cur = sync ? '0 : t_run;

  // memory 1 holds only samples of the current frame: it is cleared at t = 0
  always_comb begin
    a_cur = AW'(smp);
    for (int i = 0; i < SAMPLES_PER_SLOT - 1; i++)
      a_cur += (t_cur == '0) ? '0 : AW'(win[i]);
  end

  // local maximum at the previous sample, judged against the current one
  // the frame's last window has no successor in its frame: it is judged on its own
  assign cand      = prev_ok && up && ((t_prev == TW'(FRAME - 1)) || (a_prev >= a_cur)) &&
                     (a_prev > peak_min);
  assign take_cand = cand && (!found || a_prev > best_val);
  assign best_nxt   = take_cand ? a_prev : best_val;
  assign best_t_nxt = take_cand ? t_prev : best_t;
  assign found_nxt  = found || take_cand;
  assign close      = prev_ok && (t_prev == TW'(FRAME - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SAMPLES_PER_SLOT - 1; i++) win[i] <= '0;
      a_prev <= '0; t_prev <= '0; prev_ok <= 1'b0; up <= 1'b0;
      best_val <= '0; best_t <= '0; found <= 1'b0;
      t_run <= '0; synced <= 1'b0; first_pending <= 1'b0;
      sym_valid <= 1'b0; sym <= '0; sym_first <= 1'b0; peak <= '0; no_peak <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      no_peak   <= 1'b0;
      if (smp_valid && (synced || sync)) begin
        // memory 1: shift in the sample
        win[0] <= smp;
        for (int i = 1; i < SAMPLES_PER_SLOT - 1; i++) win[i] <= (t_cur == '0) ? '0 : win[i-1];
        // memory 2
        a_prev  <= a_cur;
        t_prev  <= t_cur;
        prev_ok <= 1'b1;
        if (t_cur == '0)         up <= 1'b1;   // the frame's first window counts as rising
        else if (a_cur > a_prev) up <= 1'b1;
        else if (a_cur < a_prev) up <= 1'b0;
        t_run  <= (t_cur == TW'(FRAME - 1)) ? '0 : t_cur + 1'b1;
        synced <= 1'b1;
        if (sync) first_pending <= 1'b1;
        // memory 3
        if (sync || close) begin
          best_val <= '0;
          best_t   <= '0;
          found    <= 1'b0;
        end else begin
          best_val <= best_nxt;
          best_t   <= best_t_nxt;
          found    <= found_nxt;
        end
        // decision
        if (close) begin
          if (found_nxt) begin
            sym_valid     <= 1'b1;
            sym           <= SW'(best_t_nxt / TW'(SAMPLES_PER_SLOT));
            sym_first     <= first_pending;
            peak          <= best_nxt;
            first_pending <= sync;
          end else begin
            no_peak <= 1'b1;
          end
        end
      end
    end
  end
endmodule
