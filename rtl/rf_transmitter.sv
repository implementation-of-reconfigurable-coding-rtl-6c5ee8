// rf_transmitter: reconfigurable all-digital RF transmitter.
// Serial data bits are BPSK mapped to a 12-bit real/imaginary symbol. Four
// paths follow: path 0 carries the real part and path 1 the imaginary part
// with a 0 degree shift, paths 2 and 3 carry the same parts shifted by 180
// degrees. In every path the sample is pulse width modulated, either by the
// ramp/comparator PWM or by the random PWM (mod_sel), and the pulse stream
// is mixed with the carrier of the path's own digital frequency synthesiser,
// tuned by its phase increment word dp[p]. Paths 0/1 and paths 2/3 each feed
// a select-and-combine stage and a serialiser, giving the two serial
// outputs tx_out[0] and tx_out[1]. This structure follows the description;
// the assignment of real/imaginary parts to the paths, the duty encoding
// (offset binary, left aligned) and the frame strobes are this design's.
// Interface: data_in is taken when data_valid is high (one clock). pwm_res
// sets the PWM resolution (period 2^(pwm_res+1) clocks). sel[2g+1:2g]
// enables the two paths of group g. tx_last[g] is high in the clock that
// sends the last bit (W32) of a frame of group g.
// Timing: a bit reaches the PWM duty register three clocks after data_valid
// and takes effect at the next PWM period; each frame is 32 clocks, MSB
// first: bits 31..16 are the first path's product, 15..0 the second's.
// NSDO, pwm_a_off, the DFS overflow strobe and the serialiser count are
// produced by the blocks but not needed here, so they are left unconnected
// inside the top.
module rf_transmitter
  import tx_pkg::*;
#(
  parameter int unsigned N_PATHS = 4,
  parameter int unsigned N_OUT   = N_PATHS / 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 data_in,
  input  logic                 data_valid,
  input  mod_sel_e             mod_sel,
  input  logic [PWM_RES_W-1:0] pwm_res,
  input  logic [ACC_W-1:0]     dp [N_PATHS],
  input  logic [N_PATHS-1:0]   sel,
  output logic [N_OUT-1:0]     tx_out,
  output logic [N_OUT-1:0]     tx_last
);
  sample_t re, im;
  logic    sym_valid;

  bpsk_mapper u_map (
    .clk       (clk),
    .rst       (rst),
    .data_in   (data_in),
    .data_valid(data_valid),
    .re        (re),
    .im        (im),
    .valid_o   (sym_valid)
  );

  amp_t product [N_PATHS];

  for (genvar p = 0; p < N_PATHS; p++) begin : g_path
    // even paths carry the real part, odd paths the imaginary part;
    // the second half of the paths is shifted by 180 degrees
    localparam bit SHIFT = (p >= N_PATHS / 2);

    sample_t              shifted;
    logic                 shifted_valid;
    logic [PWM_DIN_W-1:0] duty;
    logic                 sdo, nsdo, rp_on, rp_off, pulse;
    amp_t                 carrier;
    logic                 wrap;

    phase_shifter #(.SHIFT_180(SHIFT)) u_shift (
      .clk     (clk),
      .rst     (rst),
      .sample_i((p % 2 == 0) ? re : im),
      .valid_i (sym_valid),
      .sample_o(shifted),
      .valid_o (shifted_valid)
    );

    assign duty = sample_to_duty(shifted);

    pwm u_pwm (
      .clk     (clk),
      .rst     (rst),
      .addr_gen(pwm_res),
      .din     (duty),
      .wr      (shifted_valid),
      .sdo     (sdo),
      .nsdo    (nsdo)
    );

    pwm_random #(.SEED(16'hACE1 + 16'(p))) u_rpwm (
      .clk      (clk),
      .rst      (rst),
      .va       (duty[PWM_DIN_W-1 -: RPWM_W]),
      .pwm_a_on (rp_on),
      .pwm_a_off(rp_off)
    );

    assign pulse = (mod_sel == MOD_RPWM) ? rp_on : sdo;

    dfs u_dfs (
      .clk      (clk),
      .rst      (rst),
      .dp       (dp[p]),
      .amplitude(carrier),
      .wrap     (wrap)
    );

    mixer u_mix (
      .clk    (clk),
      .rst    (rst),
      .pulse  (pulse),
      .carrier(carrier),
      .product(product[p])
    );
  end

  for (genvar g = 0; g < N_OUT; g++) begin : g_out
    logic [WORD_W-1:0] word;
    logic [CNT_W-1:0]  count;

    select_combine u_sc (
      .clk (clk),
      .rst (rst),
      .load(tx_last[g]),
      .sel (sel[2*g +: 2]),
      .a   (product[g * 2]),
      .b   (product[g * 2 + 1]),
      .word(word)
    );

    serializer u_ser (
      .clk  (clk),
      .rst  (rst),
      .word (word),
      .sdo  (tx_out[g]),
      .count(count),
      .last (tx_last[g])
    );
  end
endmodule
