// Scaling test: the profiling hardware configured for 32 cores, the largest
// chip in the document's log-size study and the most the 5-bit core ID can
// name.
//
// What it does: all 32 cores retire random basic-block streams (one block
// per 40 clocks on average, one in ten closing its sequence early). The
// activity level of each core changes at every sequence end, so both high-
// and low-power records appear. The capture ratio is 25 %, every fourth
// core samples one sequence in two, and the memory bus is idle three clocks
// in four. After a drain period it checks, core by core, that every sampled
// sequence was either written to the log with that core's ID or counted as
// dropped, that every core reached the log, and that the log length and end
// address match the 12- and 10-byte record sizes.
//
// Interface and timing: no ports; 10 ns clock; stimulus is applied at the
// falling edge and memory writes are observed just after it. The traffic
// mix, rates and the 22000-clock run length are my own choices.
module tb_scaling_32core;
  import wi_pkg::*;

  localparam int NC = 32;

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

  int lvl [NC], nblk [NC], samp [NC], sampled [NC], written [NC], nfull = 0, nshort = 0;
  longint log_bytes = 0;

  task automatic cfg_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      bb_valid[c] = 0; bb_boundary[c] = 0; bb_addr[c] = 0; activity[c] = '0;
      lvl[c] = 15; nblk[c] = 0; samp[c] = 0; sampled[c] = 0; written[c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int u = 0; u < NUM_FU; u++) cfg_write(CFG_WEIGHT_BASE + 8'(u), 100);
    for (int c = 0; c < NC; c++) cfg_write(CFG_CAPTURE_BASE + 8'(c), 25);
    for (int c = 0; c < NC; c += 4) cfg_write(CFG_SAMPLE_BASE + 8'(c), 2);
    cfg_write(CFG_LOG_BASE, 32'h2000_0000);
    for (int i = 0; i < 20000; i++) begin
      bus_idle = ($urandom_range(0, 3) != 0);
      for (int c = 0; c < NC; c++) begin
        bb_valid[c]    = ($urandom_range(0, 39) == 0);
        bb_boundary[c] = bb_valid[c] && ($urandom_range(0, 9) == 0);
        bb_addr[c]     = $urandom;
        for (int u = 0; u < NUM_FU; u++) activity[c][u] = 4'($urandom_range(0, lvl[c]));
        if (bb_valid[c]) begin
          nblk[c]++;
          if (nblk[c] == 5 || bb_boundary[c]) begin
            if (samp[c] == 0) sampled[c]++;
            samp[c] = (samp[c] + 1 >= ((c % 4 == 0) ? 2 : 1)) ? 0 : samp[c] + 1;
            nblk[c] = 0;
            lvl[c] = $urandom_range(0, 15);
          end
        end
      end
      #1;
      if (mem_valid && mem_ready) begin
        written[mem_data.core_id]++;
        log_bytes += longint'(mem_bytes);
        if (mem_data.fu_id == FU_NONE) nshort++; else nfull++;
      end
      @(negedge clk);
    end
    for (int c = 0; c < NC; c++) begin bb_valid[c] = 0; bb_boundary[c] = 0; end
    bus_idle = 1;
    repeat (2000) begin
      #1;
      if (mem_valid && mem_ready) begin
        written[mem_data.core_id]++;
        log_bytes += longint'(mem_bytes);
        if (mem_data.fu_id == FU_NONE) nshort++; else nfull++;
      end
      @(negedge clk);
    end
    for (int c = 0; c < NC; c++) begin
      check(written[c] + int'(dropped[c]) == sampled[c],
            $sformatf("core %0d: written %0d + dropped %0d vs sampled %0d", c, written[c], dropped[c], sampled[c]));
      check(written[c] > 0, $sformatf("core %0d reached the log", c));
    end
    check(log_bytes == longint'(nfull) * 12 + longint'(nshort) * 10, "log length");
    check(mem_addr == 32'h2000_0000 + 32'(log_bytes), "log end address");
    check(nfull > 0 && nshort > 0, "both record kinds");
    $display("32 cores: full records %0d, short records %0d, log bytes %0d", nfull, nshort, log_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
