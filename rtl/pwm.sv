// pwm: ramp-and-comparator pulse width modulator.
// A ramp counter is compared with the duty value: SDO is high while the ramp
// is below the duty, NSDO is its complement. As in the description the block
// has a 32-bit data input DIN, a write enable WR, a 4-bit ADDR_GEN input and
// a serial output; how ADDR_GEN is used is this design's reading: it selects
// the resolution k = ADDR_GEN + 1 bits, so the period is 2^k clocks. DIN is
// an unsigned fraction of full scale; its top k bits are the duty, so the
// same DIN gives the same duty cycle at every resolution.
// Interface: DIN is written into the duty register when WR is high. The
// active duty and the resolution are taken at each period boundary (a write
// in the last clock of a period already counts), so a period never mixes
// two duty values.
// Timing: a period is 2^k clocks; SDO is high for the first duty clocks of
// it. Synchronous reset clears the ramp and the duty (SDO low); the first
// clock after reset is a one-clock boundary that loads duty and resolution.
module pwm
  import tx_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [PWM_RES_W-1:0] addr_gen,
  input  logic [PWM_DIN_W-1:0] din,
  input  logic                 wr,
  output logic                 sdo,
  output logic                 nsdo
);
  localparam int unsigned MAX_RES = 2 ** PWM_RES_W;  // 16-bit ramp at most

  logic [PWM_DIN_W-1:0] duty_reg;
  logic [MAX_RES-1:0]   ramp;
  logic [MAX_RES-1:0]   duty_act;
  logic [MAX_RES-1:0]   last;       // 2^k - 1 of the running period
  logic [PWM_DIN_W-1:0] duty_next;
  logic [MAX_RES-1:0]   last_next;

  assign duty_next = wr ? din : duty_reg;
  // all-ones mask of k = addr_gen + 1 bits
  assign last_next = MAX_RES'((33'(1) << (addr_gen + 5'd1)) - 33'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      duty_reg <= '0;
      ramp     <= '0;
      duty_act <= '0;
      last     <= '0;   // boundary on the first clock after reset
    end else begin
      if (wr) duty_reg <= din;
      if (ramp >= last) begin
        ramp     <= '0;
        last     <= last_next;
        duty_act <= MAX_RES'(duty_next >> (5'd31 - 5'(addr_gen)));
      end else begin
        ramp <= ramp + 1'b1;
      end
    end
  end

  assign sdo  = (ramp < duty_act);
  assign nsdo = ~sdo;
endmodule
