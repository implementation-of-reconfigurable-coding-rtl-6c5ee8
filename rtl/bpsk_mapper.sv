// bpsk_mapper: BPSK symbol mapper.
// A data bit of 0 is sent with no phase shift and a data bit of 1 with a
// 180 degree shift, as the design description states. The symbol is given
// as a 12-bit real part and a 12-bit imaginary part: bit 0 -> (+AMPLITUDE, 0),
// bit 1 -> (-AMPLITUDE, 0). The 12-bit widths follow the description; the
// amplitude value and the valid strobe are this design's choice.
// Interface: data_in is sampled when data_valid is high. Timing: re, im and
// valid_o are registered, one clock after data_valid. Synchronous reset to
// the bit-0 symbol with valid_o low.
module bpsk_mapper
  import tx_pkg::*;
#(
  parameter int AMPLITUDE = 2047
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    data_in,
  input  logic    data_valid,
  output sample_t re,
  output sample_t im,
  output logic    valid_o
);
  localparam sample_t POS = sample_t'(AMPLITUDE);
  localparam sample_t NEG = sample_t'(-AMPLITUDE);

  always_ff @(posedge clk) begin
    if (rst) begin
      re      <= POS;
      im      <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= data_valid;
      if (data_valid) begin
        re <= data_in ? NEG : POS;
        im <= '0;
      end
    end
  end
endmodule
