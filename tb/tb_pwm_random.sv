// tb_pwm_random: self-checking test of the random PWM. For several duty
// inputs it measures each switching period from the output's rising edges
// and checks that periods stay within NOM_PERIOD +/- (SPREAD-1), that
// periods pair up to exactly 2*NOM_PERIOD (so the average switching period
// equals NOM_PERIOD), that they really vary, that each on-time is
// floor(va * period / 256), and that pwm_a_off is the complement.
module tb_pwm_random;
  localparam int NOM = 256, SPREAD = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] va = 8'd128;
  logic pwm_a_on, pwm_a_off;
  int checks = 0, failures = 0;

  pwm_random #(.NOM_PERIOD(NOM), .SPREAD(SPREAD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input logic [7:0] v, input int n_periods);
    int periods[$], ons[$];
    int t, last_rise, on_run, sum_even, sum_odd, distinct, ok_even, ok_odd;
    logic prev;
    va <= v;
    // let the running period and one more finish
    repeat (2 * (NOM + SPREAD)) @(posedge clk);
    #1;
    prev = pwm_a_on; last_rise = -1; on_run = 0;
    while (periods.size() < n_periods) begin
      @(posedge clk);
      #1;
      check(pwm_a_off == ~pwm_a_on, "pwm_a_off is the complement");
      if (pwm_a_on && !prev) begin
        if (last_rise >= 0) begin
          periods.push_back(t - last_rise);
        end
        last_rise = t;
        on_run = 0;
      end
      if (pwm_a_on) on_run++;
      if (!pwm_a_on && prev && last_rise >= 0) ons.push_back(on_run);
      prev = pwm_a_on;
      t++;
    end
    ok_even = 1; ok_odd = 1; distinct = 0;
    for (int i = 0; i < periods.size(); i++) begin
      check(periods[i] > NOM - SPREAD && periods[i] < NOM + SPREAD, "period range");
      if (i + 1 < periods.size()) begin
        if (i % 2 == 0 && periods[i] + periods[i+1] != 2 * NOM) ok_even = 0;
        if (i % 2 == 1 && periods[i] + periods[i+1] != 2 * NOM) ok_odd = 0;
        if (periods[i] != periods[i+1]) distinct++;
      end
      // the pulse that starts period i has on-time floor(va * P / 256)
      if (i < ons.size())
        check(ons[i] == (int'(v) * periods[i]) / 256,
              $sformatf("on-time %0d exp %0d (P=%0d)", ons[i], (int'(v) * periods[i]) / 256, periods[i]));
    end
    check(ok_even || ok_odd, "periods pair up to 2*NOM_PERIOD");
    check(distinct > n_periods / 4, "periods vary");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(8'd128, 60);
    run(8'd200, 60);
    run(8'd17, 60);
    run(8'd255, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
