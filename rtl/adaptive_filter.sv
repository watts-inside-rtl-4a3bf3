// Per-core adaptive filter: passes only high-power code sequences on to the
// shared power analyzer.
//
// It keeps two registers: the programmable capture ratio C (in percent) and
// the highest sequence power seen since reset. A sequence is high-power when
// its power lies within the top C percent below that maximum, i.e.
//     power >= max - floor(max * C / 100),
// or when it exceeds the maximum, which then takes its value (so the
// threshold follows the maximum upward and stops moving once the hottest
// sequence has run). With C = 10 and a maximum of 50 the threshold is 45.
// High-power sequences go to `hi` with their per-unit energies; every other
// sequence goes to `lo` as a short profile record (ID, power, core ID and
// execution time, with the unit ID set to FU_NONE), so that the profile log
// holds every sampled sequence. Each classified sequence is also reported on
// `evt` (watch flag and high/low) to the causation probability module.
//
// Interface and timing: in/hi/lo are valid-ready streams. A sequence is taken
// when in_valid and in_ready; it is classified against the registers as they
// are in that clock and appears on hi or lo in the next clock, where it waits
// for its ready. One sequence is held at a time. evt is a single-clock pulse in
// the clock the sequence is taken. The threshold formula and the percent
// encoding are this design's choices.
module adaptive_filter
  import wi_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // capture ratio register
  input  logic             cr_we,
  input  logic [6:0]       cr_wdata,
  // from the power estimator
  input  logic             in_valid,
  output logic             in_ready,
  input  seq_rec_t         in_rec,
  // high-power sequences, to the power analyzer
  output logic             hi_valid,
  input  logic             hi_ready,
  output seq_rec_t         hi_rec,
  // low-power sequences, to the profile log
  output logic             lo_valid,
  input  logic             lo_ready,
  output csppv_t           lo_rec,
  // per-sequence report, to the causation probability module
  output caus_evt_t        evt,
  // observation
  output logic [PWR_W-1:0] max_power,
  output logic [PWR_W-1:0] threshold
);
  logic [6:0]  cr_q;
  logic        full_q, high_q;
  seq_rec_t    rec_q;
  logic        take, high;
  logic [13:0] span;

  // Threshold = max - floor(max * C / 100); C above 100 counts as 100.
  always_comb begin
    logic [6:0] c;
    c         = (cr_q > 7'd100) ? 7'd100 : cr_q;
    span      = (14'(max_power) * 14'(c)) / 14'd100;
    threshold = max_power - span[PWR_W-1:0];
  end

  assign take     = in_valid && in_ready;
  assign high     = (in_rec.power >= threshold);   // also true when it exceeds the maximum
  assign in_ready = !full_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_q      <= 7'd10;
      max_power <= '0;
      full_q    <= 1'b0;
      high_q    <= 1'b0;
      rec_q     <= '0;
    end else begin
      if (cr_we) cr_q <= cr_wdata;
      if (take) begin
        rec_q  <= in_rec;
        high_q <= high;
        full_q <= 1'b1;
        if (in_rec.power > max_power) max_power <= in_rec.power;
      end else if ((hi_valid && hi_ready) || (lo_valid && lo_ready)) begin
        full_q <= 1'b0;
      end
    end
  end

  assign hi_valid = full_q && high_q;
  assign hi_rec   = rec_q;
  assign lo_valid = full_q && !high_q;

  always_comb begin
    lo_rec           = '0;
    lo_rec.seq_id    = rec_q.seq_id;
    lo_rec.power     = rec_q.power;
    lo_rec.core_id   = rec_q.core_id;
    lo_rec.exec_time = rec_q.exec_time;
    lo_rec.fu_id     = FU_NONE;
    lo_rec.fu_power  = '0;
  end

  assign evt = '{valid: take, watch_hit: in_rec.watch_hit, high: high};

endmodule
