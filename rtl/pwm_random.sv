// pwm_random: random pulse width modulator (RPWM).
// The switching period is varied at random while its average stays at
// NOM_PERIOD clocks, so the average switching frequency equals that of a
// plain PWM with the same period, as the description requires. The duty
// comes from the 8-bit input va: each period of P clocks starts with
// (va * P) / 256 clocks of pwm_a_on high; pwm_a_off is the complement.
// How the period is randomised is this design's choice: a 16-bit maximal
// LFSR gives an offset d in [0, SPREAD-1]; periods come in pairs
// NOM_PERIOD + d, NOM_PERIOD - d, so every pair averages exactly NOM_PERIOD.
// The port names va, clk, pwm_a_on and pwm_a_off are those of the
// description; the synchronous reset rst is added so the LFSR and counter
// start from a known state.
// Timing: va is sampled at the first clock of each period; a new LFSR
// offset is drawn at the start of every pair.
module pwm_random
  import tx_pkg::*;
#(
  parameter int unsigned NOM_PERIOD = 256,
  parameter int unsigned SPREAD     = 64,    // must be a power of two, < NOM_PERIOD
  parameter logic [15:0] SEED       = 16'hACE1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [RPWM_W-1:0] va,
  output logic              pwm_a_on,
  output logic              pwm_a_off
);
  localparam int unsigned PER_W = $clog2(NOM_PERIOD + SPREAD);
  localparam int unsigned SPR_W = (SPREAD > 1) ? $clog2(SPREAD) : 1;

  logic [15:0]        lfsr;
  logic [PER_W-1:0]   cnt;       // position inside the period
  logic [PER_W-1:0]   period;    // length of the running period
  logic [PER_W-1:0]   on_time;   // clocks of pwm_a_on in the running period
  logic [SPR_W-1:0]   offset;    // d of the running pair
  logic               second;    // running period is the second of its pair
  logic [PER_W-1:0]   period_next;
  logic [SPR_W-1:0]   offset_next;
  logic [15:0]        lfsr_next;
  logic [PER_W+RPWM_W-1:0] on_prod;

  // x^16 + x^14 + x^13 + x^11 + 1, Fibonacci form
  assign lfsr_next = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  always_comb begin
    if (second) begin
      offset_next = SPR_W'(lfsr[SPR_W-1:0]);
      period_next = PER_W'(NOM_PERIOD) + PER_W'(offset_next);
    end else begin
      offset_next = offset;
      period_next = PER_W'(NOM_PERIOD) - PER_W'(offset);
    end
    on_prod = PER_W'(period_next) * va;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr    <= SEED;
      cnt     <= '0;
      period  <= '0;      // forces a period start on the first clock
      on_time <= '0;
      offset  <= '0;
      second  <= 1'b1;
    end else if (cnt + 1'b1 >= period) begin
      cnt     <= '0;
      period  <= period_next;
      on_time <= PER_W'(on_prod >> RPWM_W);
      offset  <= offset_next;
      second  <= ~second;
      if (second) lfsr <= lfsr_next;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign pwm_a_on  = (cnt < on_time);
  assign pwm_a_off = ~pwm_a_on;

  initial assert (SPREAD < NOM_PERIOD && (SPREAD & (SPREAD - 1)) == 0)
    else $error("pwm_random: SPREAD must be a power of two below NOM_PERIOD");
endmodule
