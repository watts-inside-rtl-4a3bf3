// Round-robin arbiter for valid-ready streams: the on-chip interconnect that
// merges the per-core streams into the shared units.
//
// N sources compete for one sink. The source granted is the first valid one
// at or after the round-robin pointer; after a transfer the pointer moves to
// the source after the winner, so every source that keeps asking is served
// within N transfers. Once a grant is offered to the sink it is held until the
// sink takes it, so the sink sees a stable offer. The arbiter adds no
// register stage: a transfer passes through in the same clock.
//
// Interface: in_valid/in_ready/in_data per source, out_valid/out_ready/
// out_data/out_src towards the sink. T is the payload type. The arbitration
// policy is this design's choice; the document shows the interconnect only as
// the path from the cores' filters to the shared units.
module rr_stream_arbiter #(
  parameter int unsigned N = 4,
  parameter type         T = logic [7:0]
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_valid,
  output logic [N-1:0]         in_ready,
  input  T                     in_data [N],
  output logic                 out_valid,
  input  logic                 out_ready,
  output T                     out_data,
  output logic [$clog2(N)-1:0] out_src
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr_q, lock_idx_q, pick;
  logic          lock_q, found;

  always_comb begin
    pick  = ptr_q;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr_q) + k) % N;
      if (!found && in_valid[idx]) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
  end

  assign out_src   = lock_q ? lock_idx_q : pick;
  assign out_valid = lock_q ? 1'b1 : found;
  assign out_data  = in_data[out_src];

  always_comb begin
    in_ready = '0;
    in_ready[out_src] = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q      <= '0;
      lock_q     <= 1'b0;
      lock_idx_q <= '0;
    end else if (out_valid && out_ready) begin
      ptr_q  <= (int'(out_src) == N - 1) ? '0 : out_src + 1'b1;
      lock_q <= 1'b0;
    end else if (out_valid) begin
      lock_q     <= 1'b1;
      lock_idx_q <= out_src;
    end
  end

  // A source must hold its offer until it is taken.
  property p_hold(int i);
    @(posedge clk) disable iff (!rst_n) in_valid[i] && !in_ready[i] |=> in_valid[i];
  endproperty
  for (genvar g = 0; g < N; g++) begin : g_hold
    a_hold : assert property (p_hold(g));
  end

endmodule
