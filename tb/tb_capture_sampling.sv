// Capture-ratio and sampling-rate sweep on one shared instruction stream.
//
// What it does: six cores of the profiling hardware see the very same
// stream of retired basic blocks and unit activity, so they produce the
// same sequences with the same power. Cores 0, 1 and 2 profile every
// sequence with capture ratios of 25 %, 10 % and 5 %; cores 3, 4 and 5 use
// a 10 % capture ratio and sample one sequence in 2, 4 and 100. These are
// the ratios and rates the evaluation of the technique sweeps. The activity
// level changes at random at each sequence end, so power varies. Blocks
// retire 30 to 60 clocks apart: all six cores finish their sequences in
// the same clock, and this spacing lets the shared analyzer keep up, so
// every difference between cores comes from the ratios and rates alone.
//
// What it checks: nothing is dropped; each core writes exactly one record
// per sampled sequence (all of them for cores 0 to 2, ceil(n/P) for the
// sampled cores); every record of a sampled core names a sequence that core
// 1 also recorded, with the same power and execution time; and the number
// of high-power records falls as the capture ratio falls (a smaller ratio
// raises the threshold, so the high set can only shrink). It prints the
// high-power share per ratio and the mean power each sampling rate sees
// against the full mean.
//
// Interface and timing: no ports; 10 ns clock; stimulus at the falling
// edge, memory writes sampled just after it. The bus is always idle, so
// the log never stalls. Stream length and traffic mix are my own choices.
module tb_capture_sampling;
  import wi_pkg::*;

  localparam int NC = 6;
  localparam int NSEQ = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        bb_valid [NC], bb_boundary [NC];
  logic [31:0] bb_addr [NC];
  activity_t   activity [NC];
  logic        cfg_we = 0;
  logic [7:0]  cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic        bus_idle = 1, mem_valid, mem_ready = 1;
  logic [31:0] mem_addr;
  logic [3:0]  mem_bytes;
  csppv_t      mem_data;
  logic        caus_busy, caus_done, ps_undef, pn_undef;
  logic [16:0] ps_lo, ps_hi, pn_lo, pn_hi, pns_lo, pns_hi;
  logic [31:0] seq_count [NC], dropped [NC], analyzed, log_full_stalls, caus_seq, caus_high;
  logic [6:0]  max_power [NC];
  logic [15:0] log_level;

  watts_inside_top #(.NUM_CORES(NC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int RATIO [NC]  = '{25, 10, 5, 10, 10, 10};
  localparam int PERIOD [NC] = '{1, 1, 1, 2, 4, 100};

  int     written [NC], high [NC];
  longint psum [NC];
  logic [15:0] ref_pwr [logic [63:0]];  // core 1: seq_id -> {exec_time, power}
  csppv_t got [NC][$];

  task automatic cfg_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic observe();
    #1;
    if (mem_valid && mem_ready) got[3'(mem_data.core_id)].push_back(mem_data);
  endtask

  initial begin
    int nblk, nseq, lvl, gap, bcount;
    logic [31:0] a;
    activity_t act;
    for (int c = 0; c < NC; c++) begin
      bb_valid[c] = 0; bb_boundary[c] = 0; bb_addr[c] = 0; activity[c] = '0;
      written[c] = 0; high[c] = 0; psum[c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int u = 0; u < NUM_FU; u++) cfg_write(CFG_WEIGHT_BASE + 8'(u), 32'(40 + 10 * u));
    for (int c = 0; c < NC; c++) begin
      cfg_write(CFG_CAPTURE_BASE + 8'(c), 32'(RATIO[c]));
      cfg_write(CFG_SAMPLE_BASE + 8'(c), 32'(PERIOD[c]));
    end
    nblk = 0; nseq = 0; lvl = 15; gap = 30; bcount = 0;
    while (nseq < NSEQ) begin
      logic v, b;
      v = (gap == 0);
      gap = v ? $urandom_range(30, 60) : gap - 1;
      b = v && ($urandom_range(0, 7) == 0);
      a = {16'(bcount), 16'h0040};  // distinct fold for every block
      if (v) bcount++;
      for (int u = 0; u < NUM_FU; u++) act[u] = 4'($urandom_range(0, lvl));
      if (v) begin
        nblk++;
        if (nblk == 5 || b) begin
          nblk = 0; nseq++; lvl = $urandom_range(0, 15);
        end
      end
      for (int c = 0; c < NC; c++) begin
        bb_valid[c] = v; bb_boundary[c] = b; bb_addr[c] = a; activity[c] = act;
      end
      observe();
      @(negedge clk);
    end
    for (int c = 0; c < NC; c++) begin bb_valid[c] = 0; bb_boundary[c] = 0; end
    repeat (500) begin observe(); @(negedge clk); end

    foreach (got[1][i]) ref_pwr[got[1][i].seq_id] = {got[1][i].exec_time, got[1][i].power};
    for (int c = 0; c < NC; c++) begin
      int want;
      want = (NSEQ + PERIOD[c] - 1) / PERIOD[c];
      check(dropped[c] == 0, $sformatf("core %0d dropped %0d", c, dropped[c]));
      check(seq_count[c] == NSEQ, $sformatf("core %0d counted %0d sequences", c, seq_count[c]));
      check(got[c].size() == want, $sformatf("core %0d wrote %0d records, want %0d", c, got[c].size(), want));
      foreach (got[c][i]) begin
        if (got[c][i].fu_id != FU_NONE) high[c]++;
        psum[c] += longint'(got[c][i].power);
        if (c >= 3) begin
          check(ref_pwr.exists(got[c][i].seq_id) &&
                ref_pwr[got[c][i].seq_id] == {got[c][i].exec_time, got[c][i].power},
                $sformatf("core %0d record %0d matches the full profile", c, i));
        end
      end
    end
    check(ref_pwr.num() == NSEQ, "sequence IDs of the stream are distinct");
    check(high[0] >= high[1] && high[1] >= high[2], "high-power share falls with the capture ratio");
    check(high[0] > high[2], "capture ratio changes the high-power share");
    for (int c = 0; c < 3; c++)
      $display("capture %0d%%: %0d of %0d sequences high-power", RATIO[c], high[c], got[c].size());
    for (int c = 3; c < NC; c++)
      $display("sampling 1/%0d: mean power %0.2f over %0d records, full mean %0.2f", PERIOD[c],
               real'(psum[c]) / got[c].size(), got[c].size(), real'(psum[1]) / got[1].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
