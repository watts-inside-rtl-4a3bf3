// Profile log buffer: collects CSPPV records on chip and writes them to the
// in-memory profile log only while the memory bus is idle.
//
// A first-in first-out store of 96-bit records sized by BUF_BYTES (4 KB by
// default, which holds 341 twelve-byte records). Records arrive on a
// valid-ready port; when the buffer is full, in_ready falls and the producers
// must wait. The drain side offers the oldest record whenever the buffer is
// not empty and the bus is idle (bus_idle high); a write is done when
// mem_valid and mem_ready are both high. A full record (one the power
// analyzer completed) takes 12 bytes of the log; a record of a low-power
// sequence (unit ID FU_NONE) takes only 10 bytes, its upper 80 bits, which
// hold the sequence ID, power, core ID and the top of the execution time.
// mem_bytes tells the memory how many of the record's bytes, counted from its
// most significant end, to store at mem_addr. The log starts at the
// programmable byte address set through log_base_we (writing it also
// restarts the log there) and records follow each other without gaps.
//
// Timing: a record written in one clock can be drained from the next. At most
// one record enters and one leaves per clock. The FIFO organisation, the
// address counter and the handshake are this design's choices; the document
// gives the buffer's size, its rule of writing memory only when the bus is
// idle, and the 12- and 10-byte record sizes. Inside the buffer every record
// takes a 96-bit slot, so 4 KB holds 341 records of either kind.
module csppv_log_buffer
  import wi_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 4096,
  parameter int unsigned DEPTH     = BUF_BYTES / (CSPPV_W / 8)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // records in
  input  logic                       in_valid,
  output logic                       in_ready,
  input  csppv_t                     in_rec,
  // log placement
  input  logic                       log_base_we,
  input  logic [31:0]                log_base,
  // memory write port
  input  logic                       bus_idle,
  output logic                       mem_valid,
  input  logic                       mem_ready,
  output logic [31:0]                mem_addr,
  output csppv_t                     mem_data,
  output logic [3:0]                 mem_bytes,
  // status
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic [31:0]                full_stalls   // clocks a record waited on a full buffer
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  csppv_t        mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          push, pop;

  assign in_ready  = (level != ($clog2(DEPTH+1))'(DEPTH));
  assign push      = in_valid && in_ready;
  assign mem_valid = (level != '0) && bus_idle;
  assign pop       = mem_valid && mem_ready;
  assign mem_data  = mem[rd_ptr];
  assign mem_bytes = (mem_data.fu_id == FU_NONE) ? 4'd10 : 4'(CSPPV_W / 8);

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_rec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr      <= '0;
      rd_ptr      <= '0;
      level       <= '0;
      mem_addr    <= '0;
      full_stalls <= '0;
    end else begin
      if (push) wr_ptr <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (int'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      level <= level + ($bits(level))'(push) - ($bits(level))'(pop);
      if (log_base_we)  mem_addr <= log_base;
      else if (pop)     mem_addr <= mem_addr + 32'(mem_bytes);
      if (in_valid && !in_ready) full_stalls <= full_stalls + 1;
    end
  end

  // The drain side never offers a record it does not hold.
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) mem_valid |-> level != '0);

endmodule
