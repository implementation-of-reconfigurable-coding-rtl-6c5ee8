// phase_accumulator: the phase accumulator of the digital frequency
// synthesiser. As in the description it is a j-bit frequency register that
// holds the phase increment word dP, a j-bit adder and a j-bit phase
// register; the phase register gains dP every clock and wraps modulo 2^j,
// so it overflows at f_out = dP * f_clk / 2^j. The top k bits are passed on
// as the phase to the amplitude converter. Loading the frequency register
// every clock (no separate write strobe) is this design's choice.
// Timing: a change of dp reaches the frequency register after one clock and
// the phase after two. wrap is high for the clock after an overflow.
// Synchronous reset clears both registers.
module phase_accumulator
  import tx_pkg::*;
#(
  parameter int unsigned J = ACC_W,
  parameter int unsigned K = PHASE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [J-1:0] dp,
  output logic [K-1:0] phase,
  output logic         wrap
);
  logic [J-1:0] freq_reg;
  logic [J-1:0] phase_reg;
  logic [J:0]   sum;

  assign sum = {1'b0, phase_reg} + {1'b0, freq_reg};

  always_ff @(posedge clk) begin
    if (rst) begin
      freq_reg  <= '0;
      phase_reg <= '0;
      wrap      <= 1'b0;
    end else begin
      freq_reg  <= dp;
      phase_reg <= sum[J-1:0];
      wrap      <= sum[J];
    end
  end

  assign phase = phase_reg[J-1 -: K];

  initial assert (K <= J) else $error("phase_accumulator: K must not exceed J");
endmodule
