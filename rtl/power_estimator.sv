// Per-core power estimator: turns activity at the functional units' sense
// points into the average power of each code sequence.
//
// It works like a counter-based power proxy. Every clock each of the fourteen
// functional units reports how many events happened at its sense point
// (ACT_W bits); the estimator multiplies that count by the unit's
// programmable weight and adds it to the unit's energy accumulator. A
// code_seq_tracker cuts the basic-block stream into code sequences. When a
// sequence ends, the accumulators (including that clock's activity) are
// copied into a result record and cleared for the next sequence, and the
// sequence power is computed as
//     power = min(127, floor(sum of unit energies / (cycles * 2**PWR_SHIFT)))
// by a 7-step sequential divider. The record then carries the 64-bit ID,
// power, core ID, execution time (clocks, saturated to 9 bits), the clock
// count, the watch flag and the per-unit energies, which the power analyzer
// needs for high-power sequences.
//
// Only sampled sequences are estimated. If a sampled sequence ends while the
// previous one is still in the divider, or waits at the output and is not
// taken in that clock, it is dropped and
// counted in `dropped`; the estimator never stalls the core.
//
// Timing: out_valid rises PWR_W + 2 clocks after the clock in which the
// sequence's last basic block retired (two clocks when the power saturates)
// and holds until out_ready. Weights, shift and divider are this design's
// choices; the document states only that weighted activity counters form
// the power value.
module power_estimator
  import wi_pkg::*;
#(
  parameter int unsigned       SEQ_LEN   = 5,
  parameter logic [CORE_W-1:0] CORE_ID   = '0,
  parameter int unsigned       PWR_SHIFT = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // retired basic blocks and activity from the core
  input  logic         bb_valid,
  input  logic [31:0]  bb_addr,
  input  logic         bb_boundary,
  input  activity_t    activity,
  // configuration
  input  weights_t     weights,
  input  logic [15:0]  sample_period,
  input  logic [31:0]  watch_addr,
  // estimated sequence
  output logic         out_valid,
  input  logic         out_ready,
  output seq_rec_t     out_rec,
  // status
  output logic [31:0]  seq_count,   // sequences completed
  output logic [31:0]  dropped      // sampled sequences lost because the output was busy
);
  localparam int unsigned TOT_W = ENERGY_W + $clog2(NUM_FU);
  localparam int unsigned DEN_W = CYC_W + PWR_SHIFT;

  logic                seq_end, watch_hit, sampled, early_end;
  logic [SEQ_ID_W-1:0] seq_id;
  logic [CYC_W-1:0]    cycles;

  code_seq_tracker #(.SEQ_LEN(SEQ_LEN)) u_tracker (
    .clk, .rst_n, .bb_valid, .bb_addr, .bb_boundary, .watch_addr, .sample_period,
    .seq_end, .seq_id, .cycles, .watch_hit, .sampled, .early_end
  );

  // ---- weighted activity accumulation --------------------------------------
  fu_energy_t acc_q, acc_next;

  always_comb begin
    for (int unsigned u = 0; u < NUM_FU; u++) begin
      logic [ENERGY_W:0] sum;
      sum = {1'b0, acc_q[u]} + (ENERGY_W+1)'(activity[u] * weights[u]);
      acc_next[u] = sum[ENERGY_W] ? '1 : sum[ENERGY_W-1:0];  // saturate
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_q <= '0;
    else if (seq_end) acc_q <= '0;
    else acc_q <= acc_next;
  end

  // ---- snapshot and power division -----------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_OUT} state_e;
  state_e state_q;

  logic [TOT_W-1:0] total;
  logic             div_start, div_busy, div_done, div_sat;
  logic [PWR_W-1:0] div_quo;

  always_comb begin
    total = '0;
    for (int unsigned u = 0; u < NUM_FU; u++) total += TOT_W'(acc_next[u]);
  end

  // The result slot is free when idle, or when its record leaves this clock.
  logic free, take;
  assign free      = (state_q == S_IDLE) || (state_q == S_OUT && out_ready);
  assign take      = seq_end && sampled && free;
  assign div_start = take;

  bounded_divider #(.NW(TOT_W), .DW(DEN_W), .QW(PWR_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(total), .den(DEN_W'(cycles) << PWR_SHIFT),
    .busy(div_busy), .done(div_done), .quo(div_quo), .sat(div_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      out_rec   <= '0;
      seq_count <= '0;
      dropped   <= '0;
    end else begin
      if (seq_end) seq_count <= seq_count + 1;
      if (seq_end && sampled && !free) dropped <= dropped + 1;
      unique case (state_q)
        S_IDLE, S_OUT: if (take) begin
          out_rec.seq_id    <= seq_id;
          out_rec.power     <= '0;
          out_rec.core_id   <= CORE_ID;
          out_rec.exec_time <= (cycles > CYC_W'({TIME_W{1'b1}})) ? '1 : cycles[TIME_W-1:0];
          out_rec.cycles    <= cycles;
          out_rec.watch_hit <= watch_hit;
          out_rec.fu_energy <= acc_next;
          state_q           <= S_DIV;
        end else if (state_q == S_OUT && out_ready) begin
          state_q <= S_IDLE;
        end
        S_DIV: if (div_done) begin
          out_rec.power <= div_quo;
          state_q       <= S_OUT;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign out_valid = (state_q == S_OUT);

endmodule
