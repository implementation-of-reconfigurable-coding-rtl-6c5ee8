// tb_select_combine: self-checking test of select-and-combine. Random
// products, path selects and load strobes are applied; the word must take
// {a, b} (a disabled path giving zeros) on a load and hold otherwise.
module tb_select_combine;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [1:0] sel = 2'b11;
  logic signed [15:0] a = '0, b = '0;
  logic [31:0] word;
  int checks = 0, failures = 0;

  select_combine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_w;
    logic [15:0] ea, eb;
    logic l;
    logic [1:0] s;
    exp_w = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 4000; i++) begin
      ea = 16'($urandom);
      eb = 16'($urandom);
      l  = ($urandom_range(0, 3) == 0);
      s  = 2'($urandom);
      a <= ea; b <= eb; load <= l; sel <= s;
      @(posedge clk);
      #1;
      if (l) exp_w = {s[1] ? ea : 16'h0, s[0] ? eb : 16'h0};
      checks++;
      if (word != exp_w) begin
        failures++;
        $display("FAIL word=%h exp=%h", word, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
