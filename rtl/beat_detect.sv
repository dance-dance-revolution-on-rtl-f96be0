// Beat detector working on the spectrum of streaming audio.
//
// An FFT delivers, for every frame of 1024 audio samples, its 1024 bins one per
// valid cycle in natural order.  This block squares and adds the real and
// imaginary parts of the lowest NBINS bins (the low sub-band, where the kick
// drum and bass live) into the sub-band energy E of the frame.
//
// Stage 1, energy beat: E is compared with the average of the energies of the
// previous HIST frames, kept in a shift register (HIST = 47 frames is about one
// second at 48 kHz).  A raw beat is flagged when E > C * average.  The test is
// done without a divider, as E * HIST * 256 > C_Q8 * sum(history), with the
// running sum of the shift register updated as a value enters and one leaves.
// No raw beat is flagged until the history has been filled once.
//
// Stage 2, clean-up: a counter holds the number of frames since the last valid
// beat.  A raw beat is accepted as a valid beat when that time is at least
// MIN_GAP frames and at least VALID_NUM/VALID_DEN of the moving average of the
// last IHIST intervals between valid beats (kept in a second shift register;
// while it is still empty only MIN_GAP applies).  An accepted beat pushes its
// interval into that history (unless the counter had saturated, as it has
// after reset), restarts the counter and raises beat_irq for one
// cycle: this is the interrupt request for the processor.
//
// Timing: energy_valid, raw_beat and beat_irq are one-cycle pulses three clock
// cycles after the valid cycle that carries bin NBINS-1.  Bins are accepted at
// any rate up to one per cycle; bins at and above NBINS are ignored.
//
// The algorithm (low sub-band energy, one-second history, threshold on the
// average, moving-average filter on beat times) follows the design description.
// The threshold C = 1.30, MIN_GAP, the 1/2 fraction, the interval history depth
// and all widths are this implementation's choices.  Reset is synchronous and
// active low.
module beat_detect #(
  parameter int XK_W     = 27,   // width of one FFT output component, signed
  parameter int IDX_W    = 10,   // width of the bin index
  parameter int NBINS    = 32,   // bins in the low sub-band
  parameter int HIST     = 47,   // frames of energy history (about 1 s)
  parameter int C_Q8     = 333,  // threshold C in Q8.8 (333/256 = 1.30)
  parameter int IHIST    = 8,    // intervals in the beat-time history
  parameter int VALID_NUM = 1,   // valid if interval >= NUM/DEN * average
  parameter int VALID_DEN = 2,
  parameter int MIN_GAP  = 4,    // frames; about 85 ms
  parameter int TW       = 8,    // width of the frame counter (saturating)
  localparam int PW      = 2 * XK_W,                  // re^2 + im^2
  localparam int EW      = PW + $clog2(NBINS),        // sub-band energy
  localparam int HSW     = EW + $clog2(HIST + 1),     // sum of the history
  localparam int CMPW    = HSW + 12,                  // comparison products
  localparam int ISW     = TW + $clog2(IHIST + 1)     // sum of intervals
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    xk_valid,
  input  logic [IDX_W-1:0]        xk_index,
  input  logic signed [XK_W-1:0]  xk_re,
  input  logic signed [XK_W-1:0]  xk_im,
  output logic                    energy_valid,
  output logic [EW-1:0]           energy,
  output logic                    raw_beat,
  output logic                    beat_irq,
  output logic [TW-1:0]           beat_interval
);

  localparam logic [TW-1:0] T_MAX = '1;

  // ---------------- stage 1: squares ----------------
  logic          p_valid, p_first, p_last;
  logic [PW-1:0] p_re2, p_im2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_first <= 1'b0;
      p_last  <= 1'b0;
      p_re2   <= '0;
      p_im2   <= '0;
    end else begin
      p_valid <= xk_valid && (xk_index < IDX_W'(NBINS));
      p_first <= xk_index == '0;
      p_last  <= xk_index == IDX_W'(NBINS - 1);
      p_re2   <= PW'(PW'(xk_re) * PW'(xk_re));
      p_im2   <= PW'(PW'(xk_im) * PW'(xk_im));
    end
  end

  // ---------------- stage 2: sub-band sum ----------------
  logic [EW-1:0] acc, acc_next;
  logic          e_done;
  logic [EW-1:0] e_frame;

  always_comb begin
    acc_next = (p_first ? '0 : acc) + EW'(p_re2) + EW'(p_im2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      e_done  <= 1'b0;
      e_frame <= '0;
    end else begin
      e_done <= 1'b0;
      if (p_valid) begin
        acc <= acc_next;
        if (p_last) begin
          e_frame <= acc_next;
          e_done  <= 1'b1;
        end
      end
    end
  end

  // ---------------- stage 3: energy history and beat decision ----------------
  logic [EW-1:0]  hist [HIST];
  logic [HSW-1:0] hist_sum;
  logic [$clog2(HIST+1)-1:0] hist_cnt;
  logic           hist_full;

  logic [TW-1:0]  ihist [IHIST];
  logic [ISW-1:0] isum;
  logic [$clog2(IHIST+1)-1:0] icnt;
  logic [TW-1:0]  t_since;

  logic [CMPW-1:0] lhs_e, rhs_e, lhs_t, rhs_t;
  logic            is_raw, gap_ok, avg_ok, is_valid;

  assign hist_full = hist_cnt == ($clog2(HIST+1))'(HIST);

  always_comb begin
    lhs_e  = CMPW'(e_frame) * CMPW'(HIST) * CMPW'(256);
    rhs_e  = CMPW'(hist_sum) * CMPW'(C_Q8);
    is_raw = hist_full && (lhs_e > rhs_e);
    lhs_t  = CMPW'(t_since) * CMPW'(icnt) * CMPW'(VALID_DEN);
    rhs_t  = CMPW'(isum) * CMPW'(VALID_NUM);
    gap_ok = t_since >= TW'(MIN_GAP);
    avg_ok = (icnt == '0) || (lhs_t >= rhs_t);
    is_valid = is_raw && gap_ok && avg_ok;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
      for (int i = 0; i < IHIST; i++) ihist[i] <= '0;
      hist_sum      <= '0;
      hist_cnt      <= '0;
      isum          <= '0;
      icnt          <= '0;
      t_since       <= T_MAX;
      energy_valid  <= 1'b0;
      energy        <= '0;
      raw_beat      <= 1'b0;
      beat_irq      <= 1'b0;
      beat_interval <= '0;
    end else begin
      energy_valid <= e_done;
      raw_beat     <= e_done && is_raw;
      beat_irq     <= e_done && is_valid;
      if (e_done) begin
        energy <= e_frame;
        // energy history: shift in the new frame, drop the oldest
        hist[0] <= e_frame;
        for (int i = 1; i < HIST; i++) hist[i] <= hist[i-1];
        hist_sum <= hist_sum + HSW'(e_frame) - HSW'(hist[HIST-1]);
        if (!hist_full) hist_cnt <= hist_cnt + 1'b1;
        // beat-time history
        if (is_valid) begin
          // a saturated counter is no interval: the first beat after reset
          // or after a long pause only restarts the counter
          if (t_since != T_MAX) begin
            ihist[0] <= t_since;
            for (int i = 1; i < IHIST; i++) ihist[i] <= ihist[i-1];
            isum <= isum + ISW'(t_since) - ISW'(ihist[IHIST-1]);
            if (icnt != ($clog2(IHIST+1))'(IHIST)) icnt <= icnt + 1'b1;
          end
          beat_interval <= t_since;
          t_since <= TW'(1);
        end else if (t_since != T_MAX) begin
          t_since <= t_since + 1'b1;
        end
      end
    end
  end

endmodule
