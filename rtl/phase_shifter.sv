// phase_shifter: the 0 degree / 180 degree box in front of each PWM.
// With SHIFT_180 = 0 the sample is passed on unchanged; with SHIFT_180 = 1
// it is negated (a 180 degree rotation of a real sample). The most negative
// code, which has no positive counterpart, saturates to the most positive.
// The description only names the 0/180 degree boxes; negation, saturation
// and the register stage are this design's choice.
// Timing: sample_o and valid_o are registered, one clock after the input.
module phase_shifter
  import tx_pkg::*;
#(
  parameter bit SHIFT_180 = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t sample_i,
  input  logic    valid_i,
  output sample_t sample_o,
  output logic    valid_o
);
  localparam sample_t MOST_NEG = {1'b1, {(SAMPLE_W-1){1'b0}}};
  localparam sample_t MOST_POS = {1'b0, {(SAMPLE_W-1){1'b1}}};

  sample_t shifted;
  always_comb begin
    if (!SHIFT_180)               shifted = sample_i;
    else if (sample_i == MOST_NEG) shifted = MOST_POS;
    else                           shifted = -sample_i;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_o <= '0;
      valid_o  <= 1'b0;
    end else begin
      sample_o <= shifted;
      valid_o  <= valid_i;
    end
  end
endmodule
