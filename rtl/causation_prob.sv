// Online causation probability module with its watch register.
//
// The user writes a basic-block address B into the watch register. Every
// core's adaptive filter then reports each sequence it classifies: whether B
// occurred in it (event b) and whether it was high-power (event h). The module
// counts all sequences S, high-power ones H, those holding B (SB) and those
// holding B that were high-power (HB); writing the watch register clears the
// counts. On `start` it freezes a copy of the counts and evaluates, in Q0.F
// fixed point (F = 16 by default, 1.0 = 2**F):
//   P(h)    = H/S         P(b,h)   = HB/S        P(b',h') = LB'/S
//   P(h_b)  = HB/SB       P(h_b')  = HB'/SB'     P(h'_b') = LB'/SB'
//   P(b,h') = LB/S        P(b',h)  = HB'/S
// (HB' = H-HB, SB' = S-SB, LB = SB-HB, LB' = SB'-HB'), and from them the
// bounds on the probabilities of sufficiency, necessity and both:
//   max{0,(P(h_b)-P(h))/P(b',h')}   <= PS  <= min{1,(P(h_b)-P(b,h))/P(b',h')}
//   max{0,(P(h)-P(h_b'))/P(b,h)}    <= PN  <= min{1,(P(h'_b')-P(b',h'))/P(b,h)}
//   max{0, P(h_b)-P(h_b'), P(h)-P(h_b'), P(h_b)-P(h)} <= PNS
//   PNS <= min{P(h_b), P(h'_b'), P(b,h)+P(b',h'), P(h_b)-P(h_b')+P(b,h')+P(b',h)}
// These are the bounds of Pearl's probability-of-causation theory that the
// method uses. All twelve quotients are formed one after another by a single
// sequential divider (F+1 clocks each); a quotient whose numerator is not
// positive is 0 without dividing, and one whose divisor is 0 is 0 and marks
// the bound as undefined (ps_undef, pn_undef). Every result is clamped to
// [0, 1].
//
// Interface and timing: evt carries up to one report per core per clock and
// is always accepted. Pulse start while busy is low; busy stays high for about
// 12 * (F + 3) clocks and `done` pulses when the six bounds are valid; they
// hold until the next start. Fixed-point format, counter width and the
// one-divider schedule are this design's choices.
module causation_prob
  import wi_pkg::*;
#(
  parameter int unsigned NUM_CORES = 4,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned F         = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  caus_evt_t             evt [NUM_CORES],
  input  logic                  watch_we,
  input  logic [31:0]           watch_wdata,
  output logic [31:0]           watch_addr,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [F:0]            ps_lo,
  output logic [F:0]            ps_hi,
  output logic [F:0]            pn_lo,
  output logic [F:0]            pn_hi,
  output logic [F:0]            pns_lo,
  output logic [F:0]            pns_hi,
  output logic                  ps_undef,
  output logic                  pn_undef,
  output logic [CNT_W-1:0]      cnt_seq,
  output logic [CNT_W-1:0]      cnt_high,
  output logic [CNT_W-1:0]      cnt_with_b,
  output logic [CNT_W-1:0]      cnt_high_with_b
);
  localparam int unsigned NW    = CNT_W + F;
  localparam logic [F:0]  ONE   = (F+1)'(1) << F;
  localparam int unsigned STEPS = 12;

  // ---- event counters ------------------------------------------------------
  logic [$clog2(NUM_CORES+1)-1:0] n_seq, n_high, n_b, n_hb;

  always_comb begin
    n_seq = '0; n_high = '0; n_b = '0; n_hb = '0;
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      if (evt[c].valid) begin
        n_seq++;
        if (evt[c].high)                     n_high++;
        if (evt[c].watch_hit)                n_b++;
        if (evt[c].high && evt[c].watch_hit) n_hb++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      watch_addr      <= '0;
      cnt_seq         <= '0;
      cnt_high        <= '0;
      cnt_with_b      <= '0;
      cnt_high_with_b <= '0;
    end else if (watch_we) begin
      watch_addr      <= watch_wdata;
      cnt_seq         <= '0;
      cnt_high        <= '0;
      cnt_with_b      <= '0;
      cnt_high_with_b <= '0;
    end else begin
      cnt_seq         <= cnt_seq + CNT_W'(n_seq);
      cnt_high        <= cnt_high + CNT_W'(n_high);
      cnt_with_b      <= cnt_with_b + CNT_W'(n_b);
      cnt_high_with_b <= cnt_high_with_b + CNT_W'(n_hb);
    end
  end

  // ---- evaluation ----------------------------------------------------------
  // frozen counts
  logic [CNT_W-1:0] s_q, h_q, sb_q, hb_q;
  logic [CNT_W-1:0] hbp, sbp, lb, lbp;
  assign hbp = h_q - hb_q;
  assign sbp = s_q - sb_q;
  assign lb  = sb_q - hb_q;
  assign lbp = sbp - hbp;

  // quotients, in step order
  logic [F:0] p_q [STEPS];
  logic [STEPS-1:0] undef_q;
  wire [F:0] p_h = p_q[0], p_bh = p_q[1], p_bphp = p_q[2], p_hb = p_q[3];
  wire [F:0] p_hbp = p_q[4], p_hpbp = p_q[5], p_bhp = p_q[6], p_bph = p_q[7];

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e        state_q;
  logic [3:0]    step_q;

  // numerator (signed, before the F-bit shift) and divisor of the current step
  logic signed [CNT_W+1:0] num_s;
  logic        [CNT_W-1:0] den;

  always_comb begin
    num_s = '0;
    den   = '0;
    unique case (step_q)
      4'd0:  begin num_s = $signed({2'b0, h_q});  den = s_q;  end
      4'd1:  begin num_s = $signed({2'b0, hb_q}); den = s_q;  end
      4'd2:  begin num_s = $signed({2'b0, lbp});  den = s_q;  end
      4'd3:  begin num_s = $signed({2'b0, hb_q}); den = sb_q; end
      4'd4:  begin num_s = $signed({2'b0, hbp});  den = sbp;  end
      4'd5:  begin num_s = $signed({2'b0, lbp});  den = sbp;  end
      4'd6:  begin num_s = $signed({2'b0, lb});   den = s_q;  end
      4'd7:  begin num_s = $signed({2'b0, hbp});  den = s_q;  end
      4'd8:  begin num_s = $signed((CNT_W+2)'(p_hb))   - $signed((CNT_W+2)'(p_h));    den = CNT_W'(p_bphp); end
      4'd9:  begin num_s = $signed((CNT_W+2)'(p_hb))   - $signed((CNT_W+2)'(p_bh));   den = CNT_W'(p_bphp); end
      4'd10: begin num_s = $signed((CNT_W+2)'(p_h))    - $signed((CNT_W+2)'(p_hbp));  den = CNT_W'(p_bh);   end
      4'd11: begin num_s = $signed((CNT_W+2)'(p_hpbp)) - $signed((CNT_W+2)'(p_bphp)); den = CNT_W'(p_bh);   end
      default: ;
    endcase
  end

  logic          div_start, div_busy, div_done, div_sat;
  logic [F:0]    div_quo;
  logic [NW-1:0] div_num;
  logic          trivial;   // numerator not positive or divisor zero

  assign div_num   = NW'(num_s[CNT_W-1:0]) << F;
  assign trivial   = (num_s <= 0) || (den == '0);
  assign div_start = (state_q == S_ISSUE) && !trivial;

  bounded_divider #(.NW(NW), .DW(CNT_W), .QW(F+1)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(den),
    .busy(div_busy), .done(div_done), .quo(div_quo), .sat(div_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      step_q  <= '0;
      s_q <= '0; h_q <= '0; sb_q <= '0; hb_q <= '0;
      for (int unsigned i = 0; i < STEPS; i++) p_q[i] <= '0;
      undef_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          s_q  <= cnt_seq;
          h_q  <= cnt_high;
          sb_q <= cnt_with_b;
          hb_q <= cnt_high_with_b;
          step_q  <= '0;
          undef_q <= '0;
          state_q <= S_ISSUE;
        end
        S_ISSUE: begin
          if (trivial) begin
            p_q[step_q]     <= '0;
            undef_q[step_q] <= (den == '0);
            if (step_q == 4'(STEPS - 1)) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end else begin
              step_q <= step_q + 1'b1;
            end
          end else begin
            state_q <= S_WAIT;
          end
        end
        S_WAIT: if (div_done) begin
          p_q[step_q] <= (div_quo > ONE) ? ONE : div_quo;
          if (step_q == 4'(STEPS - 1)) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            step_q  <= step_q + 1'b1;
            state_q <= S_ISSUE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // ---- bounds ----------------------------------------------------------------
  assign ps_lo    = p_q[8];
  assign ps_hi    = p_q[9];
  assign pn_lo    = p_q[10];
  assign pn_hi    = p_q[11];
  assign ps_undef = undef_q[8] | undef_q[9];
  assign pn_undef = undef_q[10] | undef_q[11];

  // PNS bounds from the stored probabilities, with signed differences.
  always_comb begin
    logic signed [F+3:0] lo, hi, t;
    lo = '0;
    t = $signed((F+4)'(p_hb)) - $signed((F+4)'(p_hbp)); if (t > lo) lo = t;
    t = $signed((F+4)'(p_h))  - $signed((F+4)'(p_hbp)); if (t > lo) lo = t;
    t = $signed((F+4)'(p_hb)) - $signed((F+4)'(p_h));   if (t > lo) lo = t;
    hi = $signed((F+4)'(p_hb));
    t = $signed((F+4)'(p_hpbp));                         if (t < hi) hi = t;
    t = $signed((F+4)'(p_bh)) + $signed((F+4)'(p_bphp)); if (t < hi) hi = t;
    t = $signed((F+4)'(p_hb)) - $signed((F+4)'(p_hbp))
      + $signed((F+4)'(p_bhp)) + $signed((F+4)'(p_bph)); if (t < hi) hi = t;
    if (lo > $signed((F+4)'(ONE))) lo = $signed((F+4)'(ONE));
    if (hi > $signed((F+4)'(ONE))) hi = $signed((F+4)'(ONE));
    if (hi < 0) hi = '0;
    pns_lo = lo[F:0];
    pns_hi = hi[F:0];
  end

endmodule
