// tb_rf_transmitter: end-to-end test of the transmitter at its default
// parameters. It sends BPSK bits, switches between the PWM and the random
// PWM, changes the PWM resolution and disables paths, and decodes the two
// serial outputs frame by frame. Each 32-bit frame holds two 16-bit mixer
// products. For every product the test computes the carrier of that path
// itself (phase = clock count * dP, 32767*sin) and checks that the product
// is +carrier or -carrier; the sign gives the PWM pulse level at the
// sampling instant. Over a segment, the fraction of high pulses must match
// the symbol: about 1 for the real part of a 0 on the 0 degree path, about
// 0 on the 180 degree path, opposite for a 1, and about 1/2 for the zero
// imaginary part. Every mechanism (both symbols, both modulators, the 180
// degree inversion, carrier overflow, path disable, resolution change,
// frame strobes) is counted and must occur.
module tb_rf_transmitter;
  import tx_pkg::*;
  localparam int FRAMES_PER_SEG = 64;
  localparam int SKIP_FRAMES    = 20;   // settle after a change (> 1 PWM period)

  logic clk = 1'b0, rst = 1'b1;
  logic data_in = 1'b0, data_valid = 1'b0;
  mod_sel_e mod_sel = MOD_PWM;
  logic [3:0] pwm_res = 4'd7;
  logic [31:0] dp [4];
  logic [3:0] sel = 4'b1111;
  logic [1:0] tx_out, tx_last;

  int checks = 0, failures = 0;

  rf_transmitter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // carrier of path p as seen in the frame captured at clock edge n
  function automatic int carrier(int p, longint n);
    longint unsigned ph;
    int idx;
    ph  = (longint'(n - 4) * longint'(dp[p])) % (64'd1 << 32);
    idx = int'(ph >> 22);
    return int'($floor(32767.0 * $sin(2.0 * 3.14159265358979 * idx / 1024.0) + 0.5));
  endfunction

  // running statistics of the segment
  int hi [4], tot [4], zero_half [4];
  int seg_en;
  // mechanism counters
  int n_sym0, n_sym1, n_pwm, n_rpwm, n_inv, n_wrap, n_dis, n_res, n_frames;

  longint edge_n = 0;
  logic [31:0] frame [2];

  // decode the serial outputs
  always @(posedge clk) begin
    if (!rst) begin
      int bitpos;
      edge_n <= edge_n + 1;
      #1;
      checks++;
      if (tx_last != {2{(edge_n % 32) == 31}}) begin
        failures++;
        $display("FAIL tx_last timing at edge %0d", edge_n);
      end
      if (edge_n >= 32) begin
        bitpos = int'(edge_n % 32);
        for (int g = 0; g < 2; g++) frame[g][31 - bitpos] = tx_out[g];
        if (bitpos == 31) begin
          longint cap;
          cap = edge_n - 31;             // edge at which the frame was captured
          n_frames++;
          for (int p = 0; p < 4; p++) begin
            int a, c;
            a = (p % 2 == 0) ? int'($signed(frame[p / 2][31:16])) : int'($signed(frame[p / 2][15:0]));
            c = carrier(p, cap);
            if (seg_en != 0) begin
              if (!sel[p ^ 1]) begin
                check(a == 0, "disabled path sends zeros");
                zero_half[p]++;
              end else begin
                check((a - c <= 1 && a - c >= -1) || (a + c <= 1 && a + c >= -1),
                      $sformatf("path %0d product %0d is not +/-carrier %0d", p, a, c));
                if (c > 2 || c < -2) begin
                  tot[p]++;
                  if ((a > 0) == (c > 0)) hi[p]++;
                end
              end
            end
          end
        end
      end
    end
  end

  // carrier overflows of path 0, from the tuning word
  always @(posedge clk) begin
    if (!rst && edge_n > 0) begin
      longint unsigned a0, a1;
      a0 = longint'(edge_n - 1) * longint'(dp[0]);
      a1 = longint'(edge_n) * longint'(dp[0]);
      if ((a0 >> 32) != (a1 >> 32)) n_wrap++;
    end
  end

  task automatic send_bit(input logic b);
    @(posedge clk);
    data_in    <= b;
    data_valid <= 1'b1;
    @(posedge clk);
    data_valid <= 1'b0;
    if (b) n_sym1++; else n_sym0++;
  endtask

  // one segment: apply a setting, settle, then gather statistics
  task automatic segment(input logic b, input mod_sel_e m, input logic [3:0] res,
                         input logic [3:0] s);
    real f [4];
    bit lo0;
    if (res != pwm_res) n_res++;
    mod_sel <= m;
    pwm_res <= res;
    sel     <= s;
    send_bit(b);
    repeat (SKIP_FRAMES * 32) @(posedge clk);
    for (int p = 0; p < 4; p++) begin
      hi[p] = 0; tot[p] = 0; zero_half[p] = 0;
    end
    seg_en = 1;
    repeat (FRAMES_PER_SEG * 32) @(posedge clk);
    seg_en = 0;
    for (int p = 0; p < 4; p++) begin
      if (!sel[p ^ 1]) begin
        check(zero_half[p] > 0, "disabled path observed");
        continue;
      end
      check(tot[p] > FRAMES_PER_SEG / 2, "enough decodable frames");
      f[p] = real'(hi[p]) / real'(tot[p] > 0 ? tot[p] : 1);
    end
    if (m == MOD_PWM) n_pwm++; else n_rpwm++;
    if (s != 4'b1111) n_dis++;
    // real part: path 0 at 0 degrees, path 2 at 180 degrees
    lo0 = b;                   // bit 1 -> path 0 pulses low
    if (sel[1]) check(lo0 ? f[0] < 0.15 : f[0] > 0.85, $sformatf("path 0 high fraction %f", f[0]));
    if (sel[3]) check(lo0 ? f[2] > 0.85 : f[2] < 0.15, $sformatf("path 2 high fraction %f", f[2]));
    if (sel[1] && sel[3] && ((f[0] > 0.85 && f[2] < 0.15) || (f[0] < 0.15 && f[2] > 0.85))) n_inv++;
    // imaginary part is zero: half duty on paths 1 and 3
    if (sel[0]) check(f[1] > 0.3 && f[1] < 0.7, $sformatf("path 1 high fraction %f", f[1]));
    if (sel[2]) check(f[3] > 0.3 && f[3] < 0.7, $sformatf("path 3 high fraction %f", f[3]));
    $display("segment bit=%0d mod=%s res=%0d sel=%b: fractions %.3f %.3f %.3f %.3f",
             b, m.name(), res, s, f[0], f[1], f[2], f[3]);
  endtask

  initial begin
    dp[0] = 32'h0123_4567;
    dp[1] = 32'h0234_5679;
    dp[2] = 32'h0345_6781;
    dp[3] = 32'h00F0_F0F1;
    seg_en = 0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    segment(1'b0, MOD_PWM,  4'd7, 4'b1111);
    segment(1'b1, MOD_PWM,  4'd7, 4'b1111);
    segment(1'b0, MOD_RPWM, 4'd7, 4'b1111);
    segment(1'b1, MOD_RPWM, 4'd7, 4'b1111);
    segment(1'b0, MOD_PWM,  4'd8, 4'b1010);
    segment(1'b1, MOD_PWM,  4'd8, 4'b0101);
    check(n_sym0 > 0, "symbol 0 sent");
    check(n_sym1 > 0, "symbol 1 sent");
    check(n_pwm > 0, "PWM mode used");
    check(n_rpwm > 0, "random PWM mode used");
    check(n_inv > 0, "180 degree inversion seen");
    check(n_wrap > 0, "carrier overflow");
    check(n_dis > 0, "path disable used");
    check(n_res > 0, "PWM resolution changed");
    check(n_frames > 0, "frames decoded");
    $display("mechanisms: sym0=%0d sym1=%0d pwm=%0d rpwm=%0d inversion=%0d wraps=%0d disable=%0d res_change=%0d frames=%0d",
             n_sym0, n_sym1, n_pwm, n_rpwm, n_inv, n_wrap, n_dis, n_res, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
