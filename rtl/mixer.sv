// mixer: the digital mixer that multiplies a path's modulated pulse stream
// with its DFS carrier. The pulse is taken as a bipolar +1/-1 signal, so the
// product is the carrier itself while the pulse is high and the negated
// carrier while it is low; no multiplier is needed. Reading the one-bit
// pulse as +1/-1 and saturating the one code that cannot be negated are
// this design's choices.
// Timing: product is registered, one clock after pulse and carrier.
module mixer
  import tx_pkg::*;
#(
  parameter int unsigned M = AMP_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                pulse,
  input  logic signed [M-1:0] carrier,
  output logic signed [M-1:0] product
);
  localparam logic signed [M-1:0] MOST_NEG = {1'b1, {(M-1){1'b0}}};
  localparam logic signed [M-1:0] MOST_POS = {1'b0, {(M-1){1'b1}}};

  logic signed [M-1:0] neg;
  assign neg = (carrier == MOST_NEG) ? MOST_POS : -carrier;

  always_ff @(posedge clk) begin
    if (rst) product <= '0;
    else     product <= pulse ? carrier : neg;
  end
endmodule
