// dfs: digital frequency synthesiser, the flexible local oscillator of each
// transmitter path. It is the phase accumulator (frequency register, adder,
// phase register) followed by the sine look-up table, as in the description.
// The output frequency is f_out = dp * f_clk / 2^J; the top K accumulator
// bits address the table, which returns an M-bit signed sine sample.
// Interface: dp is the phase increment (tuning) word and may change at any
// time; wrap marks each accumulator overflow, i.e. each output period.
// Timing: dp reaches the phase after two clocks and the amplitude after
// three. Synchronous reset clears the accumulator (amplitude of phase 0).
module dfs
  import tx_pkg::*;
#(
  parameter int unsigned J = ACC_W,
  parameter int unsigned K = PHASE_W,
  parameter int unsigned M = AMP_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [J-1:0]        dp,
  output logic signed [M-1:0] amplitude,
  output logic                wrap
);
  logic [K-1:0] phase;

  phase_accumulator #(.J(J), .K(K)) u_acc (
    .clk  (clk),
    .rst  (rst),
    .dp   (dp),
    .phase(phase),
    .wrap (wrap)
  );

  sine_rom #(.K(K), .M(M)) u_rom (
    .clk      (clk),
    .phase    (phase),
    .amplitude(amplitude)
  );
endmodule
