// tb_sine_rom: self-checking test of the sine look-up table. Every phase
// code is read in random order and the registered output is compared, one
// clock later, with 32767*sin(2*pi*phase/1024) computed here (within 1 LSB).
module tb_sine_rom;
  logic clk = 1'b0;
  logic [9:0] phase = '0;
  logic signed [15:0] amplitude;
  int checks = 0, failures = 0;

  sine_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    int p;
    for (int i = 0; i < 3072; i++) begin
      p = (i < 1024) ? i : $urandom_range(0, 1023);
      phase <= 10'(p);
      @(posedge clk);
      #1;
      e = 32767.0 * $sin(2.0 * 3.14159265358979 * p / 1024.0);
      checks++;
      if (real'(amplitude) - e > 1.0 || e - real'(amplitude) > 1.0) begin
        failures++;
        $display("FAIL phase %0d amplitude %0d exp %f", p, amplitude, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
