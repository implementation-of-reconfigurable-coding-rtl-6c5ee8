// tb_dfs: self-checking test of the digital frequency synthesiser. The
// amplitude must follow 32767*sin(2*pi*phi/2^32) (within 1 LSB of the table
// rounding), where phi is a phase accumulated here from the tuning word; the
// word is changed on the fly to check the retuning latency (amplitude three
// clocks after dp). The number of overflows in 8192 clocks must match
// f_out = dP * f_clk / 2^32.
module tb_dfs;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] dp = 32'h0100_0000;
  logic signed [15:0] amplitude;
  logic wrap;
  int checks = 0, failures = 0;

  dfs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference pipeline: dp -> freq -> phase -> amplitude
    logic [31:0] fr, ph;
    logic [9:0]  idx;
    real e;
    int wraps, ref_wraps;
    fr = '0; ph = '0; idx = '0; wraps = 0; ref_wraps = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 8192; t++) begin
      if (t == 4000) dp <= 32'h0C4E_1000;      // retune
      @(posedge clk);
      // advance the reference in step with the registers
      idx = ph[31:22];
      e   = 32767.0 * $sin(2.0 * 3.14159265358979 * real'(idx) / 1024.0);
      if (33'(ph) + 33'(fr) >= 33'h1_0000_0000) ref_wraps++;
      ph  = ph + fr;
      fr  = dp;
      #1;
      checks++;
      if (real'(amplitude) - e > 1.0 || e - real'(amplitude) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d amplitude %0d exp %f", t, amplitude, e);
      end
      if (wrap) wraps++;
    end
    // 4000 clocks at 2^24 (f = f_clk/256, 15 overflows) then 4192 at
    // 0x0C4E1000 (f = 0.048 f_clk, about 201 more)
    checks++;
    if (wraps != ref_wraps || wraps < 215 || wraps > 217) begin
      failures++;
      $display("FAIL overflow count %0d exp %0d", wraps, ref_wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
