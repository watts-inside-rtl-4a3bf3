// Testbench for adaptive_filter.
//
// Sends a stream of estimated sequences with random power and watch flags,
// with random stalls on both outputs, and keeps its own copy of the filter
// state (running maximum, threshold = max - floor(max * C / 100)). Checks
// where each sequence goes (hi with the full record, lo with the short
// record and unit ID 15), the per-sequence report, the maximum register, the
// published example (C = 10 %, maximum 50: 45 passes, 44 does not) and a
// capture-ratio change in the middle of the run.
module tb_adaptive_filter;
  import wi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       cr_we = 0;
  logic [6:0] cr_wdata = '0;
  logic       in_valid = 0, in_ready, hi_valid, hi_ready = 0, lo_valid, lo_ready = 0;
  seq_rec_t   in_rec = '0, hi_rec;
  csppv_t     lo_rec;
  caus_evt_t  evt;
  logic [6:0] max_power, threshold;

  adaptive_filter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int mmax = 0, cr = 10, nhi = 0, nlo = 0, nmax = 0;

  // Offer one sequence, wait until taken, then check where it went.
  task automatic send(int pwr, bit hit, bit exp_high_given, bit use_given);
    int  thr;
    bit  exp_high;
    thr      = mmax - (mmax * cr) / 100;
    exp_high = use_given ? exp_high_given : (pwr >= thr);
    in_rec           = '0;
    in_rec.seq_id    = {$urandom, $urandom};
    in_rec.power     = 7'(pwr);
    in_rec.core_id   = 5'(2);
    in_rec.exec_time = 9'($urandom);
    in_rec.cycles    = 16'($urandom);
    in_rec.watch_hit = hit;
    in_rec.fu_energy[5] = $urandom;
    in_valid = 1;
    while (!in_ready) @(negedge clk);
    #1;
    check(threshold == 7'(thr), $sformatf("threshold %0d vs %0d", threshold, thr));
    check(evt.valid && evt.high == exp_high && evt.watch_hit == hit, "report");
    @(negedge clk);
    in_valid = 0;
    if (pwr > mmax) begin mmax = pwr; nmax++; end
    check(max_power == 7'(mmax), "maximum register");
    check(!evt.valid, "report is one clock");
    check(hi_valid == exp_high && lo_valid == !exp_high, $sformatf("routing of power %0d", pwr));
    if (exp_high) begin
      check(hi_rec == in_rec, "hi record");
      nhi++;
    end else begin
      check(lo_rec.seq_id == in_rec.seq_id && lo_rec.power == in_rec.power &&
            lo_rec.core_id == in_rec.core_id && lo_rec.exec_time == in_rec.exec_time &&
            lo_rec.fu_id == FU_NONE && lo_rec.fu_power == 0, "lo record");
      nlo++;
    end
    // random stall, then release
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      check(hi_valid == exp_high && lo_valid == !exp_high, "record held while stalled");
    end
    hi_ready = 1; lo_ready = 1;
    @(negedge clk);
    hi_ready = 0; lo_ready = 0;
    check(!hi_valid && !lo_valid, "record released");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // published example: capture ratio 10 % (reset value), maximum 50
    send(50, 0, 1, 1);
    send(45, 1, 1, 1);
    send(44, 0, 0, 1);
    send(30, 1, 0, 1);
    // random stream with rising maximum
    for (int i = 0; i < 300; i++) begin
      int p;
      p = (i % 40 == 39) ? $urandom_range(60, 127) : $urandom_range(0, 70);
      if (i == 150) begin
        cr_we = 1; cr_wdata = 7'd25; cr = 25;
        @(negedge clk);
        cr_we = 0;
      end
      send(p, $urandom_range(0, 1) == 1, 0, 0);
    end
    check(nhi > 10 && nlo > 10 && nmax > 2, "both routes and maximum updates seen");
    $display("high %0d low %0d max updates %0d", nhi, nlo, nmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
