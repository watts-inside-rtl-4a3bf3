// Multicore code-sequence power profiling hardware, top level.
//
// Each core gets a power estimator and an adaptive filter. The estimator cuts
// the core's retired basic blocks into code sequences, estimates each
// sequence's average power from weighted activity counts, and hands it to the
// filter. The filter sends high-power sequences, with their per-unit
// energies, over a round-robin interconnect to one power analyzer shared by
// all cores, which names the functional unit that drew the most power. Both
// the analyzer's full 96-bit records and the filters' short records for the
// other sequences go, through a second round-robin interconnect, into a 4 KB
// log buffer that writes them to the in-memory profile log while the memory
// bus is idle. Every filter also reports each sequence (high or not, watched
// block present or not) to the causation probability module, which counts
// them and, on request, computes bounds on the probabilities that the watched
// basic block is a sufficient, necessary, or necessary-and-sufficient cause
// of high sequence power.
//
// Interface: per core, one retired basic block per clock (bb_valid, start
// address, whether it ends in a call, return or exception) and the activity
// count of each of the fourteen units; a word-wide configuration write port
// (register map in wi_pkg); a memory write port gated by bus_idle; the
// causation bounds; status counters. The arrangement (per-core estimator and
// filter, shared analyzer, causation module and buffer) follows the
// document; the handshakes, register map and status counters are this
// design's own.
module watts_inside_top
  import wi_pkg::*;
#(
  parameter int unsigned NUM_CORES = 4,
  parameter int unsigned SEQ_LEN   = 5,
  parameter int unsigned PWR_SHIFT = 8,
  parameter int unsigned BUF_BYTES = 4096,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned F         = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // cores
  input  logic             bb_valid    [NUM_CORES],
  input  logic [31:0]      bb_addr     [NUM_CORES],
  input  logic             bb_boundary [NUM_CORES],
  input  activity_t        activity    [NUM_CORES],
  // configuration writes
  input  logic             cfg_we,
  input  logic [7:0]       cfg_addr,
  input  logic [31:0]      cfg_wdata,
  // profile log memory port
  input  logic             bus_idle,
  output logic             mem_valid,
  input  logic             mem_ready,
  output logic [31:0]      mem_addr,
  output csppv_t           mem_data,
  output logic [3:0]       mem_bytes,
  // causation probability results
  output logic             caus_busy,
  output logic             caus_done,
  output logic [F:0]       ps_lo,
  output logic [F:0]       ps_hi,
  output logic [F:0]       pn_lo,
  output logic [F:0]       pn_hi,
  output logic [F:0]       pns_lo,
  output logic [F:0]       pns_hi,
  output logic             ps_undef,
  output logic             pn_undef,
  // status
  output logic [31:0]      seq_count   [NUM_CORES],
  output logic [31:0]      dropped     [NUM_CORES],
  output logic [PWR_W-1:0] max_power   [NUM_CORES],
  output logic [31:0]      analyzed,
  output logic [31:0]      log_full_stalls,
  output logic [15:0]      log_level,
  output logic [CNT_W-1:0] caus_seq,
  output logic [CNT_W-1:0] caus_high
);
  localparam int unsigned CIW = $clog2(NUM_CORES);
  localparam int unsigned LIW = $clog2(NUM_CORES + 1);

  // ---- configuration registers held at the top -----------------------------
  weights_t    weights_q;
  logic [15:0] sample_q [NUM_CORES];
  logic [31:0] watch_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned u = 0; u < NUM_FU; u++) weights_q[u] <= WEIGHT_W'(1);
      for (int unsigned c = 0; c < NUM_CORES; c++) sample_q[c] <= 16'd1;
    end else if (cfg_we) begin
      for (int unsigned u = 0; u < NUM_FU; u++)
        if (cfg_addr == CFG_WEIGHT_BASE + 8'(u)) weights_q[u] <= cfg_wdata[WEIGHT_W-1:0];
      for (int unsigned c = 0; c < NUM_CORES; c++)
        if (cfg_addr == CFG_SAMPLE_BASE + 8'(c)) sample_q[c] <= cfg_wdata[15:0];
    end
  end

  // ---- per-core estimator and filter ---------------------------------------
  logic      est_valid [NUM_CORES];
  logic      est_ready [NUM_CORES];
  seq_rec_t  est_rec   [NUM_CORES];
  logic [NUM_CORES-1:0] hi_valid, hi_ready;
  seq_rec_t  hi_rec    [NUM_CORES];
  logic [NUM_CORES:0]   log_valid, log_ready;
  csppv_t    log_rec   [NUM_CORES+1];
  caus_evt_t evt       [NUM_CORES];

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    logic [PWR_W-1:0] thr_unused;

    power_estimator #(
      .SEQ_LEN(SEQ_LEN), .CORE_ID(CORE_W'(c)), .PWR_SHIFT(PWR_SHIFT)
    ) u_est (
      .clk, .rst_n,
      .bb_valid(bb_valid[c]), .bb_addr(bb_addr[c]), .bb_boundary(bb_boundary[c]),
      .activity(activity[c]), .weights(weights_q), .sample_period(sample_q[c]),
      .watch_addr,
      .out_valid(est_valid[c]), .out_ready(est_ready[c]), .out_rec(est_rec[c]),
      .seq_count(seq_count[c]), .dropped(dropped[c])
    );

    adaptive_filter u_filt (
      .clk, .rst_n,
      .cr_we(cfg_we && cfg_addr == CFG_CAPTURE_BASE + 8'(c)), .cr_wdata(cfg_wdata[6:0]),
      .in_valid(est_valid[c]), .in_ready(est_ready[c]), .in_rec(est_rec[c]),
      .hi_valid(hi_valid[c]), .hi_ready(hi_ready[c]), .hi_rec(hi_rec[c]),
      .lo_valid(log_valid[c]), .lo_ready(log_ready[c]), .lo_rec(log_rec[c]),
      .evt(evt[c]), .max_power(max_power[c]), .threshold(thr_unused)
    );
  end

  // ---- interconnect to the shared power analyzer ---------------------------
  logic          pa_in_valid, pa_in_ready;
  seq_rec_t      pa_in_rec;
  logic [CIW-1:0] pa_src;

  rr_stream_arbiter #(.N(NUM_CORES), .T(seq_rec_t)) u_hi_xbar (
    .clk, .rst_n,
    .in_valid(hi_valid), .in_ready(hi_ready), .in_data(hi_rec),
    .out_valid(pa_in_valid), .out_ready(pa_in_ready), .out_data(pa_in_rec), .out_src(pa_src)
  );

  power_analyzer #(.PWR_SHIFT(PWR_SHIFT)) u_pa (
    .clk, .rst_n,
    .in_valid(pa_in_valid), .in_ready(pa_in_ready), .in_rec(pa_in_rec),
    .out_valid(log_valid[NUM_CORES]), .out_ready(log_ready[NUM_CORES]),
    .out_rec(log_rec[NUM_CORES]), .analyzed
  );

  // ---- interconnect to the log buffer --------------------------------------
  logic           buf_in_valid, buf_in_ready;
  csppv_t         buf_in_rec;
  logic [LIW-1:0] buf_src;

  rr_stream_arbiter #(.N(NUM_CORES + 1), .T(csppv_t)) u_log_xbar (
    .clk, .rst_n,
    .in_valid(log_valid), .in_ready(log_ready), .in_data(log_rec),
    .out_valid(buf_in_valid), .out_ready(buf_in_ready), .out_data(buf_in_rec), .out_src(buf_src)
  );

  logic [$clog2(BUF_BYTES / (CSPPV_W / 8) + 1)-1:0] buf_level;
  assign log_level = 16'(buf_level);

  csppv_log_buffer #(.BUF_BYTES(BUF_BYTES)) u_buf (
    .clk, .rst_n,
    .in_valid(buf_in_valid), .in_ready(buf_in_ready), .in_rec(buf_in_rec),
    .log_base_we(cfg_we && cfg_addr == CFG_LOG_BASE), .log_base(cfg_wdata),
    .bus_idle, .mem_valid, .mem_ready, .mem_addr, .mem_data, .mem_bytes,
    .level(buf_level), .full_stalls(log_full_stalls)
  );

  // ---- causation probability module and watch register --------------------
  logic [CNT_W-1:0] cnt_b_unused, cnt_hb_unused;

  causation_prob #(.NUM_CORES(NUM_CORES), .CNT_W(CNT_W), .F(F)) u_caus (
    .clk, .rst_n, .evt,
    .watch_we(cfg_we && cfg_addr == CFG_WATCH), .watch_wdata(cfg_wdata), .watch_addr,
    .start(cfg_we && cfg_addr == CFG_CAUS_START),
    .busy(caus_busy), .done(caus_done),
    .ps_lo, .ps_hi, .pn_lo, .pn_hi, .pns_lo, .pns_hi, .ps_undef, .pn_undef,
    .cnt_seq(caus_seq), .cnt_high(caus_high),
    .cnt_with_b(cnt_b_unused), .cnt_high_with_b(cnt_hb_unused)
  );

endmodule
