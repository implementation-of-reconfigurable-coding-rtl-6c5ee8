// serializer: parallel-to-serial output stage. A free-running counter of
// CNT_W bits (5 bits for n = 32, as in the description) is the select line
// of an n:1 multiplexer over W1..Wn; one bit leaves per clock, W1 (word
// bit n-1) first. last is high in the clock that sends Wn, so the word
// source can load the next word on that edge and the next frame starts
// without a gap.
// Timing: sdo = word[n-1-count] combinationally; count resets to 0.
module serializer
  import tx_pkg::*;
#(
  parameter int unsigned N = WORD_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         word,
  output logic                 sdo,
  output logic [$clog2(N)-1:0] count,
  output logic                 last
);
  localparam int unsigned CW = $clog2(N);

  always_ff @(posedge clk) begin
    if (rst)       count <= '0;
    else if (last) count <= '0;
    else           count <= count + 1'b1;
  end

  assign last = (count == CW'(N - 1));
  assign sdo  = word[CW'(N - 1) - count];
endmodule
