// tb_mixer: self-checking test of the mixer. Random pulse bits and carrier
// samples (including -32768) are applied; one clock later the product must
// be the carrier for a high pulse and its saturated negation for a low one.
module tb_mixer;
  logic clk = 1'b0, rst = 1'b1, pulse = 1'b0;
  logic signed [15:0] carrier = '0, product;
  int checks = 0, failures = 0;

  mixer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, e;
    bit p;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (product != 0) failures++;
    for (int i = 0; i < 4000; i++) begin
      c = (i == 5) ? -32768 : (i == 6) ? 32767 : int'($urandom_range(0, 65535)) - 32768;
      p = $urandom_range(0, 1);
      carrier <= 16'(c);
      pulse   <= p;
      @(posedge clk);
      #1;
      e = p ? c : ((c == -32768) ? 32767 : -c);
      checks++;
      if (int'(product) != e) begin
        failures++;
        $display("FAIL pulse=%0d carrier=%0d product=%0d exp=%0d", p, c, product, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
