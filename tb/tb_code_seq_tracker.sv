// Testbench for code_seq_tracker.
//
// Drives a random stream of retired basic blocks (random gaps, random
// call/return/exception ends) and keeps its own list of the blocks of the
// open sequence. Whenever a sequence ends it checks the end itself, the
// 64-bit ID rebuilt from that list (16-bit fold of the first address, 12 low
// bits of each later one), the clock count, the early-end flag, the watch
// flag for a watched address that is planted now and then, and the sampling
// pattern for sampling periods 1, 3 and 4.
module tb_code_seq_tracker;
  import wi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        bb_valid = 1'b0, bb_boundary = 1'b0;
  logic [31:0] bb_addr = '0, watch_addr = 32'h0000_abcd;
  logic [15:0] sample_period = 16'd1;
  logic        seq_end, watch_hit, sampled, early_end;
  logic [63:0] seq_id;
  logic [15:0] cycles;

  code_seq_tracker #(.SEQ_LEN(5)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] blocks [$];
  int          mcyc = 0, nseq = 0, nearly = 0, nhits = 0, nsampled = 0;
  bit          mhit = 0;
  int          samp = 0;   // position in the sampling period: the first of each period is sampled

  function automatic logic [63:0] ref_id(logic [31:0] q [$]);
    logic [63:0] id = '0;
    id[63:48] = q[0][31:16] ^ q[0][15:0];
    for (int k = 1; k < q.size(); k++) id[47 - (k-1)*12 -: 12] = q[k][11:0];
    return id;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 3; phase++) begin
      sample_period = (phase == 0) ? 16'd1 : (phase == 1) ? 16'd3 : 16'd4;
      for (int i = 0; i < 1500; i++) begin
        bit    last, early;
        mcyc++;
        bb_valid    = ($urandom_range(0, 2) == 0);
        bb_addr     = ($urandom_range(0, 19) == 0) ? watch_addr : $urandom;
        bb_boundary = bb_valid && ($urandom_range(0, 7) == 0);
        if (!bb_valid) bb_addr = watch_addr;  // an idle clock must not count as a hit
        #1;
        if (bb_valid) begin
          blocks.push_back(bb_addr);
          if (bb_addr == watch_addr) mhit = 1;
        end
        last  = bb_valid && (blocks.size() == 5 || bb_boundary);
        early = last && blocks.size() < 5;
        check(seq_end == last, $sformatf("seq_end at step %0d", i));
        if (last) begin
          check(seq_id == ref_id(blocks), $sformatf("id %h vs %h", seq_id, ref_id(blocks)));
          check(cycles == 16'(mcyc), $sformatf("cycles %0d vs %0d", cycles, mcyc));
          check(early_end == early, "early end flag");
          check(watch_hit == mhit, "watch flag");
          check(sampled == (samp == 0), "sampling pattern");
          samp = (samp + 1 >= sample_period) ? 0 : samp + 1;
          nseq++; nearly += early; nhits += mhit; nsampled += sampled;
          blocks.delete();
          mcyc = 0; mhit = 0;
        end
        @(negedge clk);
      end
      // finish the open sequence so the next phase starts a fresh period
      bb_valid = 1'b1; bb_boundary = 1'b1; bb_addr = 32'h1;
      #1;
      check(seq_end, "forced end");
      samp = (samp + 1 >= sample_period) ? 0 : samp + 1;
      blocks.delete(); mcyc = 0; mhit = 0;
      @(negedge clk);
      bb_valid = 1'b0; bb_boundary = 1'b0;
    end
    check(nearly > 10 && nhits > 5 && nseq - nearly > 10 && nsampled < nseq, "stimulus coverage");
    $display("sequences %0d early %0d watched %0d sampled %0d", nseq, nearly, nhits, nsampled);
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
