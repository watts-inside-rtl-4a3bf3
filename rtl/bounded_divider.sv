// Sequential unsigned divider whose quotient is known to be short.
//
// Computes quo = min(floor(num / den), 2**QW - 1) by restoring division,
// one quotient bit per clock, most significant bit first. Because only QW
// quotient bits are kept, a division takes QW clocks whatever the width of
// the dividend: the power estimator and power analyzer use it to form a
// 7-bit average power from a wide energy sum, and the causation probability
// module to form a Q0.F fraction (num shifted left by F, QW = F + 1).
// A quotient that would not fit, and a zero divisor, return all ones with
// `sat` set, after one clock.
//
// Interface: pulse `start` with num/den valid while `busy` is low; `done`
// pulses for one clock when quo/sat hold the result (QW clocks after start,
// or one clock for a saturated result). quo/sat hold until the next start.
module bounded_divider #(
  parameter int unsigned NW = 40,  // dividend width
  parameter int unsigned DW = 16,  // divisor width
  parameter int unsigned QW = 7    // quotient width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [QW-1:0] quo,
  output logic          sat
);
  localparam int unsigned RW = (NW > DW + QW) ? NW : DW + QW;

  logic [RW-1:0]          rem_q;
  logic [RW-1:0]          dsh_q;     // divisor aligned to the current quotient bit
  logic [$clog2(QW+1)-1:0] cnt_q;
  logic [RW-1:0]          full_den;  // den << QW: smallest dividend that saturates

  assign full_den = RW'(den) << QW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0;
      dsh_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      quo   <= '0;
      sat   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        if (den == '0 || RW'(num) >= full_den) begin
          quo  <= '1;
          sat  <= 1'b1;
          done <= 1'b1;
        end else begin
          rem_q <= RW'(num);
          dsh_q <= RW'(den) << (QW - 1);
          cnt_q <= ($clog2(QW+1))'(QW);
          quo   <= '0;
          sat   <= 1'b0;
          busy  <= 1'b1;
        end
      end else if (busy) begin
        if (rem_q >= dsh_q) begin
          rem_q <= rem_q - dsh_q;
          quo   <= {quo[QW-2:0], 1'b1};
        end else begin
          quo   <= {quo[QW-2:0], 1'b0};
        end
        dsh_q <= dsh_q >> 1;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
