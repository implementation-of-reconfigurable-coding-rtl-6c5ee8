// tb_phase_accumulator: self-checking test of the phase accumulator. The
// phase register must advance by the tuning word every clock modulo 2^32
// (checked on the top 10 bits against a count kept here), and the overflow
// rate must be f_out = dP * f_clk / 2^32: with dP = 2^26 an overflow every
// 64 clocks, with dP = 3*2^26 exactly 300 overflows in 6400 clocks.
module tb_phase_accumulator;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] dp = '0;
  logic [9:0] phase;
  logic wrap;
  int checks = 0, failures = 0;

  phase_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Reset, hold dP, and run n clocks: after clock t (t >= 1) the phase
  // register holds (t-1)*dP mod 2^32.
  task automatic run(input logic [31:0] w, input int n, output int wraps, output int first, output int spacing_ok);
    longint unsigned acc;
    int last;
    rst <= 1'b1;
    dp  <= w;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wraps = 0; first = -1; last = -1; spacing_ok = 1;
    for (int t = 1; t <= n; t++) begin
      @(posedge clk);
      #1;
      acc = (longint'(t - 1) * longint'(w)) % (64'd1 << 32);
      check(phase == 10'(acc >> 22), "phase");
      if (wrap) begin
        wraps++;
        if (last >= 0 && t - last != (64'd1 << 32) / w) spacing_ok = 0;
        last = t;
      end
    end
  endtask

  initial begin
    int wr, f, ok;
    run(32'h0400_0000, 6400, wr, f, ok);
    check(wr == 100 - 1 || wr == 100, $sformatf("overflows %0d for dP=2^26", wr));
    check(ok == 1, "overflow every 64 clocks");
    run(32'h0C00_0000, 6400, wr, f, ok);
    check(wr >= 299 && wr <= 300, $sformatf("overflows %0d for dP=3*2^26", wr));
    run(32'h1234_5679, 3000, wr, f, ok);
    check(wr >= int'((longint'(2999) * 32'h1234_5679) >> 32), "overflow count, odd dP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
