// Testbench for causation_prob.
//
// Feeds the module the four example populations used to explain the method
// (1000 sequences, 200 of them high-power, with a watched block B that occurs
// in 100/0, 5/95, 40/200 and 35/20 high/low sequences) through all four
// per-core report lanes, then starts an evaluation. The six bounds are
// compared with the same bounds computed here in floating point (tolerance
// 2**-12) and with the published example values where the formulas give them
// (PS of B1, PS upper bound of B2, PNS of B3 and B4, to two decimals). Also
// checks the counters, that the watch register write clears them, the
// undefined flag when B never occurs, and the evaluation time.
module tb_causation_prob;
  import wi_pkg::*;

  localparam int NC = 4;
  localparam int F  = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  caus_evt_t   evt [NC];
  logic        watch_we = 1'b0, start = 1'b0;
  logic [31:0] watch_wdata = '0, watch_addr;
  logic        busy, done, ps_undef, pn_undef;
  logic [F:0]  ps_lo, ps_hi, pn_lo, pn_hi, pns_lo, pns_hi;
  logic [31:0] cnt_seq, cnt_high, cnt_with_b, cnt_high_with_b;

  causation_prob #(.NUM_CORES(NC), .CNT_W(32), .F(F)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real q2r(logic [F:0] v);
    return real'(v) / real'(1 << F);
  endfunction

  function automatic real clamp01(real v);
    if (v < 0.0) return 0.0;
    if (v > 1.0) return 1.0;
    return v;
  endfunction

  function automatic real rmax(real a, real b); return (a > b) ? a : b; endfunction
  function automatic real rmin(real a, real b); return (a < b) ? a : b; endfunction

  // Present n sequences with the given flags, spread over random lanes.
  task automatic feed(int n, bit with_b, bit high);
    int left = n;
    while (left > 0) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        evt[c] = '{valid: 1'b0, watch_hit: 1'b0, high: 1'b0};
        if (left > 0 && ($urandom_range(0, 3) != 0)) begin
          evt[c] = '{valid: 1'b1, watch_hit: with_b, high: high};
          left--;
        end
      end
    end
    @(negedge clk);
    for (int c = 0; c < NC; c++) evt[c] = '0;
  endtask

  task automatic run_case(string name, int s, int h, int hb, int lb,
                          real exp_pslo, real exp_pshi, real exp_pnslo, real exp_pnshi,
                          bit chk_ps, bit chk_pshi, bit chk_pns);
    real ph, pbh, pbphp, phb, phbp, phpbp, pbhp, pbph;
    real e_pslo, e_pshi, e_pnlo, e_pnhi, e_pnslo, e_pnshi;
    int  hbp, sb, sbp, lbp, t0, t1;
    const real TOL = 1.0 / 4096.0;
    const real TOLD = 1.0 / 512.0;  // PS and PN divide rounded fractions once more
    sb = hb + lb; hbp = h - hb; sbp = s - sb; lbp = sbp - hbp;

    @(negedge clk);
    watch_we = 1'b1; watch_wdata = 32'h0040_1000 + s;
    @(negedge clk);
    watch_we = 1'b0;
    check(cnt_seq == 0 && cnt_high == 0, {name, ": watch write clears counts"});
    check(watch_addr == 32'h0040_1000 + s, {name, ": watch register"});

    feed(hb, 1, 1);
    feed(lb, 1, 0);
    feed(hbp, 0, 1);
    feed(lbp, 0, 0);
    check(cnt_seq == s && cnt_high == h && cnt_with_b == sb && cnt_high_with_b == hb,
          $sformatf("%s: counts %0d %0d %0d %0d", name, cnt_seq, cnt_high, cnt_with_b, cnt_high_with_b));

    @(negedge clk); start = 1'b1; t0 = cyc;
    @(negedge clk); start = 1'b0;
    check(busy, {name, ": busy after start"});
    wait (done); t1 = cyc;
    @(negedge clk);
    check(t1 - t0 <= 12 * (F + 3) + 2, $sformatf("%s: evaluation took %0d clocks", name, t1 - t0));

    ph = real'(h)/s; pbh = real'(hb)/s; pbphp = real'(lbp)/s;
    phb = real'(hb)/sb; phbp = real'(hbp)/sbp; phpbp = real'(lbp)/sbp;
    pbhp = real'(lb)/s; pbph = real'(hbp)/s;
    e_pslo  = clamp01((phb - ph) / pbphp);
    e_pshi  = clamp01((phb - pbh) / pbphp);
    e_pnlo  = clamp01((ph - phbp) / pbh);
    e_pnhi  = clamp01((phpbp - pbphp) / pbh);
    e_pnslo = clamp01(rmax(rmax(0.0, phb - phbp), rmax(ph - phbp, phb - ph)));
    e_pnshi = clamp01(rmin(rmin(phb, phpbp), rmin(pbh + pbphp, phb - phbp + pbhp + pbph)));

    $display("%s: PS [%f %f] PN [%f %f] PNS [%f %f]", name,
             q2r(ps_lo), q2r(ps_hi), q2r(pn_lo), q2r(pn_hi), q2r(pns_lo), q2r(pns_hi));
    check((q2r(ps_lo)  - e_pslo)  < TOLD && (e_pslo  - q2r(ps_lo))  < TOLD, {name, ": PS lower"});
    check((q2r(ps_hi)  - e_pshi)  < TOLD && (e_pshi  - q2r(ps_hi))  < TOLD, {name, ": PS upper"});
    check((q2r(pn_lo)  - e_pnlo)  < TOLD && (e_pnlo  - q2r(pn_lo))  < TOLD, {name, ": PN lower"});
    check((q2r(pn_hi)  - e_pnhi)  < TOLD && (e_pnhi  - q2r(pn_hi))  < TOLD, {name, ": PN upper"});
    check((q2r(pns_lo) - e_pnslo) < TOL && (e_pnslo - q2r(pns_lo)) < TOL, {name, ": PNS lower"});
    check((q2r(pns_hi) - e_pnshi) < TOL && (e_pnshi - q2r(pns_hi)) < TOL, {name, ": PNS upper"});
    check(!ps_undef && !pn_undef, {name, ": bounds defined"});
    // published example values, two decimals
    if (chk_ps)   check(q2r(ps_lo) > exp_pslo - 0.005 && q2r(ps_hi) < exp_pshi + 0.005 &&
                        q2r(ps_hi) > exp_pshi - 0.005, {name, ": published PS"});
    if (chk_pshi) check(q2r(ps_hi) > exp_pshi - 0.005 && q2r(ps_hi) < exp_pshi + 0.005,
                        {name, ": published PS upper"});
    if (chk_pns)  check(q2r(pns_lo) > exp_pnslo - 0.005 && q2r(pns_lo) < exp_pnslo + 0.005 &&
                        q2r(pns_hi) > exp_pnshi - 0.005 && q2r(pns_hi) < exp_pnshi + 0.005,
                        {name, ": published PNS"});
  endtask

  initial begin
    for (int c = 0; c < NC; c++) evt[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    //        name  S     H    HB   LB   PSlo PShi PNSlo  PNShi  ps pshi pns
    run_case("B1", 1000, 200, 100, 0,   1.0, 1.0, 0.0,   0.0,   1, 0, 0);
    run_case("B2", 1000, 200, 5,   95,  0.0, 0.06,0.0,   0.0,   0, 1, 0);
    run_case("B3", 1000, 200, 40,  200, 0.0, 0.0, 0.0,   0.167, 0, 0, 1);
    run_case("B4", 1000, 200, 35,  20,  0.0, 0.0, 0.462, 0.636, 0, 0, 1);

    // B never occurs: P(h_b) has no divisor, and PN has none either.
    @(negedge clk); watch_we = 1'b1; watch_wdata = 32'hdead_0000;
    @(negedge clk); watch_we = 1'b0;
    feed(30, 0, 1);
    feed(70, 0, 0);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (done); @(negedge clk);
    check(pn_undef, "absent block: PN undefined");
    check(ps_lo == 0 && ps_hi == 0 && pns_lo == 0 && pns_hi == 0, "absent block: zero bounds");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
