// Testbench for csppv_log_buffer.
//
// Pushes random 96-bit records while the bus toggles between busy and idle
// and the memory accepts at random. Checks that nothing is written while the
// bus is busy, that records leave in the order they came, each right after the
// previous one (12 bytes for a full record, 10 for a low-power one) from the programmed log base, that the buffer holds
// exactly 341 records (4 KB) before it refuses input, that stalls on a full
// buffer are counted, and that the level follows the traffic.
module tb_csppv_log_buffer;
  import wi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready, log_base_we = 0, bus_idle = 0, mem_valid, mem_ready = 0;
  csppv_t      in_rec = '0, mem_data;
  logic [31:0] log_base = '0, mem_addr, full_stalls;
  logic [8:0]  level;
  logic [3:0]  mem_bytes;

  csppv_log_buffer #(.BUF_BYTES(4096)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  csppv_t      q [$];
  logic [31:0] exp_addr;
  int          nwr = 0, nin = 0;

  // One clock: optional push and drain, with the reference queue following.
  task automatic tick(bit push, bit idle, bit rdy);
    csppv_t r;
    r        = {$urandom, $urandom, $urandom};
    if ($urandom_range(0, 1) == 1) r.fu_id = FU_NONE;   // short record of a low-power sequence
    in_rec   = r;
    in_valid = push;
    bus_idle = idle;
    mem_ready = rdy;
    #1;
    check(mem_valid == (idle && q.size() > 0), "drain only when bus idle and not empty");
    check(in_ready == (q.size() < 341), "ready while not full");
    check(level == 9'(q.size()), "level");
    if (mem_valid && mem_ready) begin
      check(mem_data == q[0], "record order");
      check(mem_addr == exp_addr, $sformatf("address %h vs %h", mem_addr, exp_addr));
      check(mem_bytes == ((q[0].fu_id == FU_NONE) ? 4'd10 : 4'd12), $sformatf("record length %0d for unit %0d", mem_bytes, q[0].fu_id));
      exp_addr += (q[0].fu_id == FU_NONE) ? 10 : 12;
      void'(q.pop_front());
      nwr++;
    end
    if (push && in_ready) begin q.push_back(r); nin++; end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    log_base_we = 1; log_base = 32'h8000_0000; exp_addr = 32'h8000_0000;
    @(negedge clk);
    log_base_we = 0;
    // mixed traffic
    for (int i = 0; i < 2000; i++)
      tick($urandom_range(0, 1) == 1, $urandom_range(0, 3) != 0, $urandom_range(0, 3) != 0);
    // bus busy: fill up, then keep pushing against the full buffer
    for (int i = 0; i < 400; i++) tick(1, 0, 1);
    check(q.size() == 341 && !in_ready, "full at 341 records");
    check(full_stalls >= 32'd40, $sformatf("full stalls counted (%0d)", full_stalls));
    // bus idle again: drain everything
    for (int i = 0; i < 400; i++) tick(0, 1, 1);
    check(q.size() == 0 && level == 0, "drained");
    $display("in %0d written %0d", nin, nwr);
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
