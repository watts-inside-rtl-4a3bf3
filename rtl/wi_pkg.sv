// Shared types and constants of the code-sequence power profiling hardware.
//
// The profile record (CSPPV, code sequence power profile vector) is 96 bits:
// a 64-bit code sequence ID, 7-bit sequence power, 5-bit core ID, 9-bit
// execution time, 4-bit ID of the hottest functional unit and its 7-bit power,
// packed in that order from the most significant bit down. Field widths and
// order follow the published record layout; the fourteen functional units are
// the ones the method profiles. Everything else here (activity and weight
// widths, accumulator widths, the configuration register map) is a choice of
// this implementation.
package wi_pkg;

  // ---- CSPPV layout --------------------------------------------------------
  localparam int unsigned SEQ_ID_W = 64;
  localparam int unsigned PWR_W    = 7;
  localparam int unsigned CORE_W   = 5;
  localparam int unsigned TIME_W   = 9;
  localparam int unsigned FU_ID_W  = 4;
  localparam int unsigned CSPPV_W  = SEQ_ID_W + PWR_W + CORE_W + TIME_W + FU_ID_W + PWR_W;  // 96

  // ---- functional units with activity sense points -------------------------
  localparam int unsigned NUM_FU = 14;

  typedef enum logic [FU_ID_W-1:0] {
    FU_ITLB    = 4'd0,   // instruction TLB
    FU_DTLB    = 4'd1,   // data TLB
    FU_IL1     = 4'd2,   // level-1 instruction cache
    FU_DL1     = 4'd3,   // level-1 data cache
    FU_BPRED   = 4'd4,   // branch predictor
    FU_RENAME  = 4'd5,   // rename logic
    FU_ROB     = 4'd6,   // reorder buffer
    FU_REGFILE = 4'd7,   // register file
    FU_SCHED   = 4'd8,   // scheduler
    FU_IALU    = 4'd9,   // integer ALU
    FU_FALU    = 4'd10,  // floating-point ALU
    FU_L2      = 4'd11,  // level-2 cache
    FU_L3      = 4'd12,  // level-3 cache
    FU_LSQ     = 4'd13,  // load/store queue
    FU_NONE    = 4'd15   // record of a low-power sequence: no unit analysed
  } fu_id_e;

  typedef struct packed {
    logic [SEQ_ID_W-1:0] seq_id;
    logic [PWR_W-1:0]    power;
    logic [CORE_W-1:0]   core_id;
    logic [TIME_W-1:0]   exec_time;
    fu_id_e              fu_id;
    logic [PWR_W-1:0]    fu_power;
  } csppv_t;

  // ---- power estimator sizing ----------------------------------------------
  localparam int unsigned ACT_W    = 4;   // events per cycle at one sense point
  localparam int unsigned WEIGHT_W = 8;   // programmable weight per unit
  localparam int unsigned ENERGY_W = 32;  // per-unit weighted activity accumulator
  localparam int unsigned CYC_W    = 16;  // internal sequence cycle counter

  typedef logic [NUM_FU-1:0][ACT_W-1:0]    activity_t;
  typedef logic [NUM_FU-1:0][WEIGHT_W-1:0] weights_t;
  typedef logic [NUM_FU-1:0][ENERGY_W-1:0] fu_energy_t;

  // A code sequence after power estimation: what the adaptive filter sees and,
  // for high-power sequences, what travels on to the shared power analyzer.
  typedef struct packed {
    logic [SEQ_ID_W-1:0] seq_id;
    logic [PWR_W-1:0]    power;
    logic [CORE_W-1:0]   core_id;
    logic [TIME_W-1:0]   exec_time;
    logic [CYC_W-1:0]    cycles;     // unsaturated length, divisor for unit power
    logic                watch_hit;  // sequence holds the watched basic block
    fu_energy_t          fu_energy;  // weighted activity per unit
  } seq_rec_t;

  // One classified sequence, reported to the causation probability module.
  typedef struct packed {
    logic valid;
    logic watch_hit;
    logic high;
  } caus_evt_t;

  // ---- configuration register map (word writes) ----------------------------
  // 0x00+c : capture ratio of core c, in percent (0..100)
  // 0x20+c : sampling period of core c (1 = every sequence, 0 treated as 1)
  // 0x40+u : activity weight of functional unit u (all cores)
  // 0x50   : watched basic-block address (also clears the causation counters)
  // 0x51   : byte address at which the profile log starts in memory
  // 0x52   : start a causation probability evaluation
  localparam logic [7:0] CFG_CAPTURE_BASE = 8'h00;
  localparam logic [7:0] CFG_SAMPLE_BASE  = 8'h20;
  localparam logic [7:0] CFG_WEIGHT_BASE  = 8'h40;
  localparam logic [7:0] CFG_WATCH        = 8'h50;
  localparam logic [7:0] CFG_LOG_BASE     = 8'h51;
  localparam logic [7:0] CFG_CAUS_START   = 8'h52;

endpackage
