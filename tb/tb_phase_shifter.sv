// tb_phase_shifter: self-checking test of the 0 and 180 degree shifters.
// Random samples, including the extreme codes, go through one shifter of
// each kind; after one clock the 0 degree output must equal the input and
// the 180 degree output its negation (the most negative code saturating).
module tb_phase_shifter;
  import tx_pkg::*;
  logic clk = 1'b0, rst = 1'b1, valid_i = 1'b0;
  sample_t sample_i, out0, out180;
  logic v0, v180;
  int checks = 0, failures = 0;

  phase_shifter #(.SHIFT_180(1'b0)) dut0 (
    .clk, .rst, .sample_i, .valid_i, .sample_o(out0), .valid_o(v0));
  phase_shifter #(.SHIFT_180(1'b1)) dut180 (
    .clk, .rst, .sample_i, .valid_i, .sample_o(out180), .valid_o(v180));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int s, neg;
    sample_i = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: s = -2048;
        1: s = 2047;
        2: s = 0;
        default: s = $signed($urandom_range(0, 4095)) - 2048;
      endcase
      sample_i <= sample_t'(s);
      valid_i  <= i[0];
      @(posedge clk);
      #1;
      neg = (s == -2048) ? 2047 : -s;
      check(int'(out0) == s, "0 degree output");
      check(int'(out180) == neg, "180 degree output");
      check(v0 == i[0] && v180 == i[0], "valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
