// Testbench for power_estimator.
//
// Phase 1: random basic blocks and random activity with random weights; the
// testbench sums weight * activity per unit itself, and after each sequence
// (followed by enough idle clocks that nothing is dropped) checks the record:
// ID, power = min(127, total / (cycles * 256)), core ID, 9-bit saturated
// execution time, clock count, per-unit energies, and that it appears 9
// clocks after the sequence's last block (2 clocks when the power saturates).
// Phase 2: out_ready held low while two sequences end; the second must be
// dropped and counted. Phase 3: sampling period 2; only every other sequence
// may produce a record.
module tb_power_estimator;
  import wi_pkg::*;

  localparam int SHIFT = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic        bb_valid = 0, bb_boundary = 0, out_valid, out_ready = 1;
  logic [31:0] bb_addr = '0, watch_addr = 32'h5555_0000;
  activity_t   activity = '0;
  weights_t    weights;
  logic [15:0] sample_period = 16'd1;
  seq_rec_t    out_rec;
  logic [31:0] seq_count, dropped;

  power_estimator #(.SEQ_LEN(5), .CORE_ID(5'd3), .PWR_SHIFT(SHIFT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint unsigned acc [NUM_FU];
  int mcyc = 0, nblk = 0, nsat = 0, nrec = 0;

  // One clock of stimulus; returns 1 if this clock ended a sequence.
  task automatic step(bit blk, bit boundary, bit hot);
    mcyc++;
    bb_valid    = blk;
    bb_boundary = boundary;
    bb_addr     = $urandom;
    for (int u = 0; u < NUM_FU; u++) begin
      activity[u] = hot ? 4'hf : 4'($urandom_range(0, 15));
      acc[u] += activity[u] * weights[u];
    end
    if (blk) nblk++;
  endtask

  task automatic expect_record(int t_end);
    longint unsigned total = 0;
    int              exp_pwr, lat;
    for (int u = 0; u < NUM_FU; u++) total += acc[u];
    exp_pwr = int'(total / (longint'(mcyc) << SHIFT));
    if (exp_pwr > 127) exp_pwr = 127;
    lat = (exp_pwr == 127 && total >= (longint'(mcyc) << SHIFT) * 128) ? 2 : 9;
    while (!out_valid) begin @(negedge clk); if (cyc - t_end > 50) begin $display("stuck: mcyc %0d seq_count %0d dropped %0d", mcyc, seq_count, dropped); break; end end
    check(cyc - t_end == lat, $sformatf("latency %0d, expected %0d", cyc - t_end, lat));
    check(out_rec.power == 7'(exp_pwr), $sformatf("power %0d vs %0d", out_rec.power, exp_pwr));
    check(out_rec.core_id == 5'd3, "core id");
    check(out_rec.cycles == 16'(mcyc), $sformatf("cycles %0d vs %0d", out_rec.cycles, mcyc));
    check(out_rec.exec_time == ((mcyc > 511) ? 9'd511 : 9'(mcyc)), "exec time");
    for (int u = 0; u < NUM_FU; u++)
      check(out_rec.fu_energy[u] == 32'(acc[u]), $sformatf("energy of unit %0d", u));
    if (lat == 2) nsat++;
    nrec++;
  endtask

  task automatic clear_model();
    for (int u = 0; u < NUM_FU; u++) acc[u] = 0;
    mcyc = 0; nblk = 0;
  endtask

  initial begin
    for (int u = 0; u < NUM_FU; u++) weights[u] = 8'($urandom_range(128, 255));
    clear_model();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // ---- phase 1 ----
    for (int s = 0; s < 60; s++) begin
      bit ended, hot;
      int t_end;
      ended = 0; hot = (s % 10 == 9);
      while (!ended) begin
        bit blk, bnd;
        blk = ($urandom_range(0, 1) == 0) || (s % 15 == 14);   // some long, some short
        bnd = blk && ($urandom_range(0, 5) == 0);
        if (s % 15 == 14) blk = ($urandom_range(0, 150) == 0);     // a few very long sequences
        step(blk, bnd && blk, hot);
        ended = blk && (nblk == 5 || bnd);
        if (ended) t_end = cyc;
        @(negedge clk);
      end
      bb_valid = 0; bb_boundary = 0; activity = '0;
      expect_record(t_end);
      clear_model();
      // the idle clocks spent waiting for the record belong to the next sequence
      mcyc = cyc - t_end - 1;
    end
    check(nsat > 0, "a saturated power was seen");
    // ---- phase 2: drop ----
    @(negedge clk);   // let the last record of phase 1 leave
    out_ready = 0;
    @(negedge clk);
    begin
      int d0;
      d0 = dropped;
      bb_valid = 1; bb_boundary = 1; @(negedge clk);
      bb_valid = 0; bb_boundary = 0; repeat (12) @(negedge clk);
      bb_valid = 1; bb_boundary = 1; @(negedge clk);
      bb_valid = 0; bb_boundary = 0; @(negedge clk);
      check(dropped == d0 + 1, $sformatf("second sequence dropped while output busy (%0d -> %0d)", d0, dropped));
      check(out_valid, "first record still offered");
      out_ready = 1; @(negedge clk);
      check(!out_valid, "record taken");
    end
    // ---- phase 3: sampling ----
    sample_period = 16'd2;
    begin
      int n0, got;
      n0 = seq_count; got = 0;
      for (int s = 0; s < 10; s++) begin
        bb_valid = 1; bb_boundary = 1; @(negedge clk);
        bb_valid = 0; bb_boundary = 0;
        repeat (15) begin @(negedge clk); if (out_valid) got++; end
      end
      check(seq_count == n0 + 10, "sequences counted");
      check(got == 5, $sformatf("sampled records %0d, expected 5", got));
    end
    $display("records %0d saturated %0d", nrec, nsat);
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
