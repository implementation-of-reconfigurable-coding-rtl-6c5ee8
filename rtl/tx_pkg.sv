// tx_pkg: widths and small helpers shared by the blocks of the all-digital
// RF transmitter. The 12-bit symbol width, the 32-bit PWM input word, the
// 4-bit PWM resolution field and the 5-bit serialiser counter come from the
// design description; the DFS widths (32-bit accumulator, 10 phase bits,
// 16 amplitude bits) are this design's own choice.
package tx_pkg;
  localparam int unsigned SAMPLE_W  = 12;  // BPSK real / imaginary width
  localparam int unsigned PWM_DIN_W = 32;  // PWM duty input word
  localparam int unsigned PWM_RES_W = 4;   // PWM ADDR_GEN (resolution select)
  localparam int unsigned RPWM_W    = 8;   // random PWM duty input
  localparam int unsigned ACC_W     = 32;  // DFS phase accumulator (j)
  localparam int unsigned PHASE_W   = 10;  // DFS phase to ROM (k)
  localparam int unsigned AMP_W     = 16;  // DFS amplitude (m) = mixer width
  localparam int unsigned WORD_W    = 2 * AMP_W;  // W1..Wn, n = 32
  localparam int unsigned CNT_W     = $clog2(WORD_W); // 5-bit counter

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [AMP_W-1:0]    amp_t;

  // Modulator selection of the transmitter top
  typedef enum logic {MOD_PWM = 1'b0, MOD_RPWM = 1'b1} mod_sel_e;

  // Offset-binary duty word for the PWM: the signed sample is moved to
  // unsigned (sample + 2^(SAMPLE_W-1)) and left-aligned in 32 bits, so the
  // word is a fraction of full scale.
  function automatic logic [PWM_DIN_W-1:0] sample_to_duty(sample_t s);
    return {~s[SAMPLE_W-1], s[SAMPLE_W-2:0], {(PWM_DIN_W-SAMPLE_W){1'b0}}};
  endfunction
endpackage
