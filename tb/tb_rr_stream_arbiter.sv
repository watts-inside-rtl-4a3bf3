// Testbench for rr_stream_arbiter.
//
// Four sources each send a numbered series of words, offering them at random
// and holding each offer until it is taken; the sink stalls at random. Checks
// that every word arrives exactly once and in order per source, that out_src
// names the sender, that an offer to the sink does not change while it
// stalls, and that with all four sources always asking the grants rotate
// 0, 1, 2, 3, 0, ...
module tb_rr_stream_arbiter;
  localparam int N = 4;
  typedef logic [15:0] word_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] in_valid = '0, in_ready;
  word_t        in_data [N];
  logic         out_valid, out_ready = 0;
  word_t        out_data;
  logic [1:0]   out_src;

  rr_stream_arbiter #(.N(N), .T(word_t)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sent [N], got [N];
  bit    stalled = 0;
  int    taken = -1;
  word_t last_data;
  logic [1:0] last_src;

  initial begin
    for (int s = 0; s < N; s++) begin sent[s] = 0; got[s] = 0; in_data[s] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      begin : one_clock
        bit all;
        all = (i >= 2000);
        if (taken >= 0) in_valid[taken] = 0;   // the transfer happened at the last edge
        taken = -1;
        for (int s = 0; s < N; s++) begin
          if (!in_valid[s] && (all || $urandom_range(0, 2) == 0)) begin
            in_valid[s] = 1;
            in_data[s]  = word_t'({s[1:0], 14'(sent[s])});
          end
        end
        out_ready = all ? 1'b1 : ($urandom_range(0, 2) != 0);
        #1;
        if (stalled) check(out_valid && out_data == last_data && out_src == last_src, "offer held");
        if (out_valid) begin
          check(out_data[15:14] == out_src, "source tag");
          check(in_valid[out_src], "granted source is asking");
        end
        if (out_valid && out_ready) begin
          check(out_data[13:0] == 14'(got[out_src]), "in order, once");
          if (all && i > 2000) check(out_src == 2'(last_src + 1), "round robin");
          got[out_src]++;
          sent[out_src]++;
          taken = int'(out_src);
        end
        stalled   = out_valid && !out_ready;
        last_data = out_data;
        last_src  = out_src;
      end
      @(negedge clk);
    end
    for (int s = 0; s < N; s++) check(got[s] > 300, $sformatf("source %0d served %0d", s, got[s]));
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
