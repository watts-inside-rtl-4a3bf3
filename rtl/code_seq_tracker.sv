// Code sequence tracker: cuts the retired basic-block stream of one core into
// code sequences and names them.
//
// A code sequence is SEQ_LEN consecutively executed basic blocks (five by
// default). A block that ends in a call, a return or an exception closes the
// sequence early, so that no sequence straddles a function boundary or an
// exception. The 64-bit sequence ID folds the 32-bit start address of the
// first block to FOLD_W bits (upper half XOR lower half) and appends the low
// LOW_W address bits of each later block; slots of blocks a short sequence
// does not have stay zero. The fold and the slot widths are this design's
// reading of "fold the first address, concatenate low bits of the others".
//
// The tracker also counts the sequence length in clocks, notes whether the
// watched basic-block address occurred in it, and applies periodic sampling:
// one sequence in every `sample_period` is marked sampled (period 0 or 1
// samples every sequence).
//
// Interface and timing: the core presents one retired basic block per clock
// at most (bb_valid, bb_addr, bb_boundary). In the clock where the last
// block of a sequence arrives, seq_end is high and seq_id, cycles, watch_hit
// and sampled describe the sequence combinationally; that clock is counted
// as the sequence's last clock, and the next clock starts a new sequence.
module code_seq_tracker
  import wi_pkg::*;
#(
  parameter int unsigned SEQ_LEN = 5,
  parameter int unsigned FOLD_W  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bb_valid,
  input  logic [31:0]         bb_addr,
  input  logic                bb_boundary,   // block ends in call, return or exception
  input  logic [31:0]         watch_addr,
  input  logic [15:0]         sample_period,
  output logic                seq_end,
  output logic [SEQ_ID_W-1:0] seq_id,
  output logic [CYC_W-1:0]    cycles,
  output logic                watch_hit,
  output logic                sampled,
  output logic                early_end      // closed by a call, return or exception
);
  localparam int unsigned LOW_W = (SEQ_LEN > 1) ? (SEQ_ID_W - FOLD_W) / (SEQ_LEN - 1) : 0;
  localparam int unsigned CNT_W = $clog2(SEQ_LEN + 1);

  logic [CNT_W-1:0]    nbb_q;     // blocks already in the open sequence
  logic [CYC_W-1:0]    cyc_q;     // clocks already spent in the open sequence
  logic [SEQ_ID_W-1:0] id_q;
  logic                hit_q;
  logic [15:0]         samp_q;    // position within the sampling period

  logic [SEQ_ID_W-1:0] id_next;
  logic                last_bb;

  // Place the new block's address bits into the ID.
  always_comb begin
    id_next = id_q;
    if (nbb_q == '0) begin
      id_next = '0;
      id_next[SEQ_ID_W-1 -: FOLD_W] = bb_addr[31:16] ^ bb_addr[15:0];
    end else begin
      for (int unsigned k = 1; k < SEQ_LEN; k++) begin
        if (nbb_q == CNT_W'(k))
          id_next[SEQ_ID_W-1-FOLD_W-(k-1)*LOW_W -: LOW_W] = bb_addr[LOW_W-1:0];
      end
    end
  end

  assign last_bb   = (nbb_q == CNT_W'(SEQ_LEN - 1)) || bb_boundary;
  assign seq_end   = bb_valid && last_bb;
  assign early_end = seq_end && (nbb_q != CNT_W'(SEQ_LEN - 1));
  assign seq_id    = id_next;
  assign cycles    = (cyc_q == '1) ? cyc_q : cyc_q + 1'b1;
  assign watch_hit = hit_q || (bb_addr == watch_addr);
  assign sampled   = (samp_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbb_q  <= '0;
      cyc_q  <= '0;
      id_q   <= '0;
      hit_q  <= 1'b0;
      samp_q <= '0;
    end else begin
      if (seq_end) begin
        nbb_q <= '0;
        cyc_q <= '0;
        id_q  <= '0;
        hit_q <= 1'b0;
        samp_q <= (sample_period <= 16'd1 || samp_q >= sample_period - 16'd1) ? '0
                                                                             : samp_q + 16'd1;
      end else begin
        if (cyc_q != '1) cyc_q <= cyc_q + 1'b1;
        if (bb_valid) begin
          nbb_q <= nbb_q + 1'b1;
          id_q  <= id_next;
          hit_q <= watch_hit;
        end
      end
    end
  end

endmodule
