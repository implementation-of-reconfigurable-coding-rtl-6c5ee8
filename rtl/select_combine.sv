// select_combine: gathers the mixer outputs of the two paths of one group
// into the parallel word W1..Wn that the serialiser reads, n = 2 * M = 32.
// On each load strobe it captures both products and holds them for a whole
// serialiser frame: path a fills W1..W16 (word bits 31..16, W1 = bit 31),
// path b fills W17..W32. The select part is a per-path enable: a path that
// is not selected sends zeros in its half. The description only names this
// block; the concatenation order and the enables are this design's choice.
// Timing: word changes on the clock edge at which load is high.
module select_combine
  import tx_pkg::*;
#(
  parameter int unsigned M = AMP_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic [1:0]          sel,     // sel[1]: path a, sel[0]: path b
  input  logic signed [M-1:0] a,
  input  logic signed [M-1:0] b,
  output logic [2*M-1:0]      word
);
  always_ff @(posedge clk) begin
    if (rst) word <= '0;
    else if (load) word <= {sel[1] ? a : '0, sel[0] ? b : '0};
  end
endmodule
