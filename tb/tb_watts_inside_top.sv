// End-to-end testbench for watts_inside_top at its default size (four cores,
// five-block sequences, 4 KB log buffer).
//
// Four cores run the same small program: basic blocks drawn from a pool of
// 32 addresses, some of which are "hot" and raise load/store-queue and
// scheduler activity while they execute. The testbench keeps its own model of
// the whole pipeline: sequence cutting, weighted energies, sequence power,
// per-core filter maximum and threshold, sampling, hottest unit and its
// power, and the causation counts.
//
// Phase A (light traffic, nothing dropped): every record written to memory
// must match a record predicted by the model, and after the run every
// predicted record must have been written, back to back (12 bytes for a
// full record, 10 for a low-power one) from the programmed log base. The causation counts must equal the model's,
// and the bounds its floating-point bounds.
// Phase B (heavy traffic, bus busy for long stretches): the buffer fills,
// producers wait, estimators drop sequences; every sampled sequence must be
// either written or counted as dropped.
// Each mechanism (early end, sampling, high and low routes, maximum update,
// contention at both interconnects, bus-busy hold-off, full buffer, drop,
// causation evaluation) is counted and must occur at least once.
module tb_watts_inside_top;
  import wi_pkg::*;

  localparam int NC = 4;
  localparam int F  = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int since_rst = 0;   // clocks since reset was released
  always @(posedge clk) if (rst_n) since_rst++;

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
  logic [F:0]  ps_lo, ps_hi, pn_lo, pn_hi, pns_lo, pns_hi;
  logic [31:0] seq_count [NC], dropped [NC], analyzed, log_full_stalls, caus_seq, caus_high;
  logic [6:0]  max_power [NC];
  logic [15:0] log_level;

  watts_inside_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- stimulus and model state ---------------------------------------------
  logic [31:0] pool [32];
  int          weight [NUM_FU];
  int          cr [NC], period [NC];
  logic [31:0] cur [NC];                 // block each core is executing
  logic [31:0] blocks [NC][$];
  longint      acc [NC][NUM_FU];
  int          mcyc [NC], mmax [NC], samp [NC];
  bit          mhit [NC];
  int          gap_lo = 10, gap_hi = 20;
  int          wait_left [NC];
  bit          exact = 1;                // phase A: predict every record
  csppv_t      expected [$];
  longint      ids_seen [NC][longint];   // every sequence ID made, for phase B
  int          m_s = 0, m_h = 0, m_sb = 0, m_hb = 0;
  int          sampled_ends = 0, writes = 0;
  logic [31:0] exp_addr;

  // mechanism counters
  int n_early = 0, n_unsampled = 0, n_high = 0, n_low = 0, n_maxup = 0;
  int n_hi_contend = 0, n_log_contend = 0, n_bus_hold = 0, n_full = 0, n_drop = 0, n_caus = 0;

  function automatic logic [63:0] ref_id(logic [31:0] q [$]);
    logic [63:0] id = '0;
    id[63:48] = q[0][31:16] ^ q[0][15:0];
    for (int k = 1; k < q.size(); k++) id[47 - (k-1)*12 -: 12] = q[k][11:0];
    return id;
  endfunction

  function automatic bit is_hot(logic [31:0] a);
    for (int k = 0; k < 4; k++) if (a == pool[k]) return 1;
    return 0;
  endfunction

  task automatic cfg_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Model of one finished sequence of core c.
  task automatic finish_seq(int c, bit early);
    longint total = 0;
    int     pwr, thr, best, fp;
    bit     high, smp;
    logic [63:0] id;
    csppv_t r;
    id  = ref_id(blocks[c]);
    ids_seen[c][longint'(id)] = 1;
    smp = (samp[c] == 0);
    samp[c] = (samp[c] + 1 >= period[c]) ? 0 : samp[c] + 1;
    if (early) n_early++;
    if (!smp) n_unsampled++;
    if (smp) begin
      sampled_ends++;
      for (int u = 0; u < NUM_FU; u++) total += acc[c][u];
      pwr = int'(total / (longint'(mcyc[c]) * 256));
      if (pwr > 127) pwr = 127;
      thr  = mmax[c] - (mmax[c] * cr[c]) / 100;
      high = (pwr >= thr);
      if (pwr > mmax[c]) begin mmax[c] = pwr; n_maxup++; end
      r = '0;
      r.seq_id = id; r.power = 7'(pwr); r.core_id = 5'(c);
      r.exec_time = (mcyc[c] > 511) ? 9'd511 : 9'(mcyc[c]);
      if (high) begin
        best = 0;
        for (int u = 1; u < NUM_FU; u++) if (acc[c][u] > acc[c][best]) best = u;
        fp = int'(acc[c][best] / (longint'(mcyc[c]) * 256));
        if (fp > 127) fp = 127;
        r.fu_id = fu_id_e'(best); r.fu_power = 7'(fp);
        n_high++;
      end else begin
        r.fu_id = FU_NONE; r.fu_power = '0;
        n_low++;
      end
      if (exact) begin
        expected.push_back(r);
        m_s++; m_h += high; m_sb += mhit[c]; m_hb += (high && mhit[c]);
      end
    end
    blocks[c].delete();
    for (int u = 0; u < NUM_FU; u++) acc[c][u] = 0;
    mcyc[c] = 0; mhit[c] = 0;
  endtask

  // One clock of all four cores.
  task automatic drive_clock();
    for (int c = 0; c < NC; c++) begin
      bit hot;
      mcyc[c]++;
      hot = is_hot(cur[c]);
      for (int u = 0; u < NUM_FU; u++) begin
        activity[c][u] = 4'($urandom_range(0, hot ? 8 : 4));
        if (hot && (u == int'(FU_LSQ))) activity[c][u] = 4'd15;
        if (hot && (u == int'(FU_SCHED))) activity[c][u] = 4'd12;
        acc[c][u] += activity[c][u] * weight[u];
      end
      bb_valid[c] = 0; bb_boundary[c] = 0; bb_addr[c] = cur[c];
      if (wait_left[c] == 0) begin
        bb_valid[c]    = 1;
        bb_boundary[c] = ($urandom_range(0, 9) == 0);
        blocks[c].push_back(cur[c]);
        if (cur[c] == pool[0]) mhit[c] = 1;
        if (blocks[c].size() == 5 || bb_boundary[c]) finish_seq(c, blocks[c].size() < 5);
        cur[c]       = pool[$urandom_range(0, 31)];
        wait_left[c] = $urandom_range(gap_lo, gap_hi);
      end else begin
        wait_left[c]--;
      end
    end
    #1;
    // observation of the interconnects and the buffer
    if ($countones(dut.hi_valid) > 1) n_hi_contend++;
    if ($countones(dut.log_valid) > 1) n_log_contend++;
    if (!bus_idle && log_level != 0) n_bus_hold++;
    if (dut.buf_in_valid && !dut.buf_in_ready) n_full++;
    if (mem_valid && mem_ready) begin
      check(mem_addr == exp_addr, $sformatf("log address %h vs %h", mem_addr, exp_addr));
      check(mem_bytes == ((mem_data.fu_id == FU_NONE) ? 4'd10 : 4'd12), "record length");
      exp_addr += (mem_data.fu_id == FU_NONE) ? 10 : 12;
      writes++;
      if (exact) begin
        int k;
        k = -1;
        foreach (expected[j]) if (k < 0 && expected[j] == mem_data) k = j;
        check(k >= 0, $sformatf("record core %0d id %h power %0d unit %0d/%0d predicted",
                                mem_data.core_id, mem_data.seq_id, mem_data.power,
                                mem_data.fu_id, mem_data.fu_power));
        if (k >= 0) expected.delete(k);
      end else begin
        check(int'(mem_data.core_id) < NC && ids_seen[mem_data.core_id[1:0]].exists(longint'(mem_data.seq_id)),
              "record belongs to a sequence that ran");
        check(mem_data.fu_id == FU_NONE || int'(mem_data.fu_id) < NUM_FU, "unit ID");
      end
    end
    @(negedge clk);
  endtask

  task automatic idle_cores(int n);
    for (int c = 0; c < NC; c++) wait_left[c] = 1 << 30;
    repeat (n) drive_clock();
  endtask

  initial begin
    int dsum;
    for (int k = 0; k < 32; k++) pool[k] = 32'h0040_0000 + 32'($urandom_range(0, 16'hffff)) * 4;
    for (int u = 0; u < NUM_FU; u++) weight[u] = $urandom_range(64, 200);
    cr = '{25, 10, 5, 10};
    period = '{1, 1, 1, 2};
    for (int c = 0; c < NC; c++) begin
      bb_valid[c] = 0; bb_boundary[c] = 0; bb_addr[c] = 0; activity[c] = '0;
      cur[c] = pool[c]; mcyc[c] = 0; mmax[c] = 0; samp[c] = 0; mhit[c] = 0; wait_left[c] = 1 << 30;
      for (int u = 0; u < NUM_FU; u++) acc[c][u] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // configuration (the cores are idle; idle clocks belong to the first sequence)
    for (int u = 0; u < NUM_FU; u++) cfg_write(CFG_WEIGHT_BASE + 8'(u), weight[u]);
    for (int c = 0; c < NC; c++) cfg_write(CFG_CAPTURE_BASE + 8'(c), cr[c]);
    for (int c = 0; c < NC; c++) cfg_write(CFG_SAMPLE_BASE + 8'(c), period[c]);
    cfg_write(CFG_WATCH, pool[0]);
    cfg_write(CFG_LOG_BASE, 32'h1000_0000);
    exp_addr = 32'h1000_0000;
    // restart the model's clock counts and energies: the configuration writes
    // ran with zero activity, so only the clock counts matter
    for (int c = 0; c < NC; c++) begin
      mcyc[c] = since_rst;
      wait_left[c] = $urandom_range(0, gap_hi);
    end

    // ---- phase A ----
    for (int i = 0; i < 30000; i++) begin
      bus_idle = ($urandom_range(0, 4) != 0);
      drive_clock();
    end
    bus_idle = 1;
    idle_cores(200);
    dsum = 0;
    for (int c = 0; c < NC; c++) dsum += dropped[c];
    check(dsum == 0, "nothing dropped under light traffic");
    check(expected.size() == 0, $sformatf("%0d predicted records never written", expected.size()));
    check(caus_seq == 32'(m_s) && caus_high == 32'(m_h),
          $sformatf("causation counts %0d/%0d vs %0d/%0d", caus_seq, caus_high, m_s, m_h));
    for (int c = 0; c < NC; c++) check(max_power[c] == 7'(mmax[c]), "filter maximum");
    // causation evaluation
    cfg_write(CFG_CAUS_START, 0);
    wait (caus_done);
    @(negedge clk);
    n_caus++;
    begin
      real ph, pbh, pbphp, phb, phbp, phpbp, ps_l, pns_h;
      int  hbp, sbp, lbp;
      hbp = m_h - m_hb; sbp = m_s - m_sb; lbp = sbp - hbp;
      ph = real'(m_h) / m_s; pbh = real'(m_hb) / m_s; pbphp = real'(lbp) / m_s;
      phb = real'(m_hb) / m_sb; phbp = real'(hbp) / sbp; phpbp = real'(lbp) / sbp;
      ps_l = (phb - ph) / pbphp; if (ps_l < 0) ps_l = 0; if (ps_l > 1) ps_l = 1;
      pns_h = phb; if (phpbp < pns_h) pns_h = phpbp;
      if (pbh + pbphp < pns_h) pns_h = pbh + pbphp;
      if (phb - phbp + real'(m_sb - m_hb) / m_s + real'(hbp) / m_s < pns_h)
        pns_h = phb - phbp + real'(m_sb - m_hb) / m_s + real'(hbp) / m_s;
      $display("watched block: S=%0d H=%0d SB=%0d HB=%0d  PS >= %f (model %f)  PNS <= %f (model %f)",
               m_s, m_h, m_sb, m_hb, real'(ps_lo) / 65536.0, ps_l, real'(pns_hi) / 65536.0, pns_h);
      check(real'(ps_lo) / 65536.0 - ps_l < 0.002 && ps_l - real'(ps_lo) / 65536.0 < 0.002, "PS lower bound");
      check(real'(pns_hi) / 65536.0 - pns_h < 0.001 && pns_h - real'(pns_hi) / 65536.0 < 0.001, "PNS upper bound");
    end

    // ---- phase B ----
    exact  = 0;
    gap_lo = 0; gap_hi = 2;
    for (int c = 0; c < NC; c++) wait_left[c] = 0;
    for (int i = 0; i < 6000; i++) begin
      bus_idle = (i % 3000) > 2200;
      drive_clock();
    end
    bus_idle = 1;
    idle_cores(1500);
    dsum = 0;
    for (int c = 0; c < NC; c++) dsum += dropped[c];
    n_drop = dsum;
    check(log_level == 0, "log drained");
    check(writes + dsum == sampled_ends,
          $sformatf("written %0d + dropped %0d == sampled %0d", writes, dsum, sampled_ends));
    begin
      int total_seq;
      total_seq = 0;
      for (int c = 0; c < NC; c++) total_seq += seq_count[c];
      check(total_seq == sampled_ends + n_unsampled, "every sequence counted");
    end

    $display("mechanisms: early=%0d unsampled=%0d high=%0d low=%0d maxupd=%0d hi_contend=%0d log_contend=%0d bus_hold=%0d full=%0d drop=%0d caus=%0d",
             n_early, n_unsampled, n_high, n_low, n_maxup, n_hi_contend, n_log_contend,
             n_bus_hold, n_full, n_drop, n_caus);
    check(n_early > 0,       "early end seen");
    check(n_unsampled > 0,   "sampling seen");
    check(n_high > 0,        "high-power route seen");
    check(n_low > 0,         "low-power route seen");
    check(n_maxup > 0,       "maximum update seen");
    check(n_hi_contend > 0,  "analyzer contention seen");
    check(n_log_contend > 0, "log contention seen");
    check(n_bus_hold > 0,    "bus-busy hold-off seen");
    check(n_full > 0,        "full buffer seen");
    check(n_drop > 0,        "drop seen");
    check(n_caus > 0,        "causation evaluation seen");
    $display("records written %0d, analysed %0d", writes, analyzed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
