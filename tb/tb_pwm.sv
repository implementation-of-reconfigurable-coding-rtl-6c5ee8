// tb_pwm: self-checking test of the ramp/comparator PWM. For several
// resolutions and duty words it measures the output itself: the distance
// between rising edges must be the period 2^(addr_gen+1), every high pulse
// must last the top addr_gen+1 bits of DIN, NSDO must be the complement of
// SDO, and a duty of zero must give no pulse at all.
module tb_pwm;
  logic clk = 1'b0, rst = 1'b1, wr = 1'b0;
  logic [3:0] addr_gen = 4'd3;
  logic [31:0] din = '0;
  logic sdo, nsdo;
  int checks = 0, failures = 0;

  pwm dut (.*);

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

  // Program one setting, let the old period end and three new ones pass, then measure four periods.
  int prev_period = 16;

  task automatic run(input logic [3:0] ag, input logic [31:0] d);
    int period, duty, t, last_rise, high_run, rises, highs;
    logic prev;
    period = 1 << (ag + 1);
    duty   = int'(d >> (31 - ag));
    @(posedge clk);
    addr_gen <= ag;
    din      <= d;
    wr       <= 1'b1;
    @(posedge clk);
    wr       <= 1'b0;
    din      <= 32'($urandom);   // must be ignored while wr is low
    // the old setting runs to the end of its period first
    repeat (prev_period + 3 * period + 2) @(posedge clk);
    prev_period = period;
    #1;
    prev = sdo; last_rise = -1; high_run = 0; rises = 0; highs = 0;
    for (t = 0; t < 6 * period; t++) begin
      @(posedge clk);
      #1;
      check(nsdo == ~sdo, "nsdo is the complement of sdo");
      if (sdo) begin
        highs++;
        high_run++;
      end
      if (sdo && !prev) begin
        if (last_rise >= 0) check(t - last_rise == period, "period 2^(addr_gen+1)");
        last_rise = t;
        rises++;
      end
      if (!sdo && prev && rises > 0) begin
        check(high_run == duty, $sformatf("pulse width %0d exp %0d", high_run, duty));
      end
      if (!sdo) high_run = 0;
      prev = sdo;
    end
    check(highs == 6 * duty, $sformatf("high clocks %0d exp %0d (ag=%0d)", highs, 6 * duty, ag));
    if (duty > 0 && duty < period) check(rises >= 5, "pulses seen");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(4'd3, 32'h8000_0000);   // 16-clock period, 8 clocks high
    run(4'd3, 32'h3000_0000);   // 3 of 16
    run(4'd3, 32'h0000_0000);   // duty 0
    run(4'd0, 32'h8000_0000);   // 2-clock period, 1 high
    run(4'd7, 32'hFFF0_0000);   // 256-clock period, 255 high
    run(4'd7, 32'h1234_5678);   // 0x12 = 18 of 256
    run(4'd11, 32'hA5A5_A5A5);  // 4096-clock period
    for (int i = 0; i < 6; i++) run(4'($urandom_range(0, 9)), 32'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
