// Testbench for power_analyzer.
//
// Sends high-power sequences with random per-unit energies (some with ties,
// some with one unit far above the rest, some with a unit power that
// saturates) and random output stalls. For each it checks the completed
// 96-bit record: fields copied from the sequence, the unit with the largest
// energy (lowest number on a tie) and its power
// min(127, energy / (cycles * 256)), and that the record appears 9 clocks
// after the sequence was taken (2 when the unit power saturates).
module tb_power_analyzer;
  import wi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  seq_rec_t    in_rec = '0;
  csppv_t      out_rec;
  logic [31:0] analyzed;

  power_analyzer #(.PWR_SHIFT(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nsat = 0, nties = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int best, t0, lat;
      longint unsigned e, fp;
      in_rec           = '0;
      in_rec.seq_id    = {$urandom, $urandom};
      in_rec.power     = 7'($urandom);
      in_rec.core_id   = 5'($urandom_range(0, 3));
      in_rec.exec_time = 9'($urandom);
      in_rec.cycles    = 16'($urandom_range(1, 600));
      for (int u = 0; u < NUM_FU; u++)
        in_rec.fu_energy[u] = 32'($urandom_range(0, 4000) * in_rec.cycles);
      if (i % 7 == 0) begin   // a tie between two units
        int a, b;
        a = $urandom_range(0, 6); b = $urandom_range(7, 13);
        in_rec.fu_energy[a] = 32'(in_rec.cycles) * 5000;
        in_rec.fu_energy[b] = 32'(in_rec.cycles) * 5000;
        nties++;
      end
      if (i % 11 == 0) in_rec.fu_energy[$urandom_range(0, 13)] = 32'(in_rec.cycles) * 40000;
      // reference
      best = 0;
      for (int u = 1; u < NUM_FU; u++) if (in_rec.fu_energy[u] > in_rec.fu_energy[best]) best = u;
      e  = 64'(in_rec.fu_energy[best]);
      fp = e / (longint'(in_rec.cycles) * 256);
      if (fp > 127) fp = 127;
      lat = (e >= longint'(in_rec.cycles) * 256 * 128) ? 2 : 9;
      if (lat == 2) nsat++;

      in_valid = 1;
      while (!in_ready) @(negedge clk);
      t0 = cyc;
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) @(negedge clk);
      check(cyc - t0 == lat, $sformatf("latency %0d vs %0d", cyc - t0, lat));
      check(out_rec.seq_id == in_rec.seq_id && out_rec.power == in_rec.power &&
            out_rec.core_id == in_rec.core_id && out_rec.exec_time == in_rec.exec_time,
            "copied fields");
      check(out_rec.fu_id == fu_id_e'(best), $sformatf("unit %0d vs %0d", out_rec.fu_id, best));
      check(out_rec.fu_power == 7'(fp), $sformatf("unit power %0d vs %0d", out_rec.fu_power, fp));
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(out_valid && !in_ready, "record held while stalled");
      end
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    check(analyzed == 400, "analysed count");
    check(nsat > 5 && nties > 5, "ties and saturation seen");
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
