// tb_bpsk_mapper: self-checking test of the BPSK mapper. Random bits are
// presented with random valid strobes; one clock later the real part must be
// +2047 for a 0 and -2047 for a 1, the imaginary part 0, and the symbol must
// hold while valid is low.
module tb_bpsk_mapper;
  import tx_pkg::*;
  logic clk = 1'b0, rst = 1'b1, data_in = 1'b0, data_valid = 1'b0;
  sample_t re, im;
  logic valid_o;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  bpsk_mapper dut (.*);

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
    sample_t exp_re;
    logic v;
    exp_re = 12'sd2047;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(re == 12'sd2047 && im == 0 && !valid_o, "reset value");
    for (int i = 0; i < 2000; i++) begin
      v = ($urandom_range(0, 2) == 0);
      data_in    <= $urandom_range(0, 1);
      data_valid <= v;
      @(posedge clk);
      #1;
      if (v) begin
        exp_re = data_in ? -12'sd2047 : 12'sd2047;
        if (data_in) ones++; else zeros++;
      end
      check(valid_o == v, "valid latency one clock");
      check(re == exp_re, "real part");
      check(im == 0, "imaginary part");
    end
    check(ones > 0 && zeros > 0, "both symbols seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
