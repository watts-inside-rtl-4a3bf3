// Shared power analyzer: finds which functional unit drew the most power in
// a high-power code sequence and completes its profile record.
//
// One analyzer serves all cores; the adaptive filters send it only the
// sequences they judge high-power. For each it picks the unit with the
// largest weighted-activity energy (the lowest unit number wins a tie; all
// units share the sequence length, so the largest energy is the largest
// power) and divides that energy by cycles * 2**PWR_SHIFT, the same scale the
// estimator uses for the sequence power, saturating at 127. The result is a
// full 96-bit CSPPV: the estimator's ID, power, core ID and execution time,
// plus the 4-bit unit ID and 7-bit unit power.
//
// Interface and timing: valid-ready in and out. A sequence is taken when the
// analyzer is idle; its record is offered PWR_W + 2 clocks later (two clocks
// if the unit power saturates) and held until out_ready. The analyzer takes
// no new sequence while a record waits. The selection and division circuits
// are this design's; the document gives the unit's job and its output fields.
module power_analyzer
  import wi_pkg::*;
#(
  parameter int unsigned PWR_SHIFT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  seq_rec_t    in_rec,
  output logic        out_valid,
  input  logic        out_ready,
  output csppv_t      out_rec,
  output logic [31:0] analyzed      // sequences analysed since reset
);
  localparam int unsigned DEN_W = CYC_W + PWR_SHIFT;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_OUT} state_e;
  state_e state_q;

  logic [FU_ID_W-1:0]  best_id;
  logic [ENERGY_W-1:0] best_e;
  logic                take, div_busy, div_done, div_sat;
  logic [PWR_W-1:0]    div_quo;

  always_comb begin
    best_id = '0;
    best_e  = in_rec.fu_energy[0];
    for (int unsigned u = 1; u < NUM_FU; u++) begin
      if (in_rec.fu_energy[u] > best_e) begin
        best_e  = in_rec.fu_energy[u];
        best_id = FU_ID_W'(u);
      end
    end
  end

  assign in_ready  = (state_q == S_IDLE);
  assign take      = in_valid && in_ready;
  assign out_valid = (state_q == S_OUT);

  bounded_divider #(.NW(ENERGY_W), .DW(DEN_W), .QW(PWR_W)) u_div (
    .clk, .rst_n, .start(take), .num(best_e), .den(DEN_W'(in_rec.cycles) << PWR_SHIFT),
    .busy(div_busy), .done(div_done), .quo(div_quo), .sat(div_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      out_rec  <= '0;
      analyzed <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (take) begin
          out_rec.seq_id    <= in_rec.seq_id;
          out_rec.power     <= in_rec.power;
          out_rec.core_id   <= in_rec.core_id;
          out_rec.exec_time <= in_rec.exec_time;
          out_rec.fu_id     <= fu_id_e'(best_id);
          out_rec.fu_power  <= '0;
          state_q           <= S_DIV;
        end
        S_DIV: if (div_done) begin
          out_rec.fu_power <= div_quo;
          analyzed         <= analyzed + 1;
          state_q          <= S_OUT;
        end
        S_OUT: if (out_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
