// tb_serializer: self-checking test of the serialiser. A new random word is
// offered each time last is high and captured on that edge, as the
// select-and-combine stage does; the output must send every word MSB first,
// one bit per clock, with last exactly every 32 clocks.
module tb_serializer;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] word = '0;
  logic sdo, last;
  logic [4:0] count;
  int checks = 0, failures = 0;

  serializer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_seen, frames;
    last_seen = -1;
    frames = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    #1;
    for (int f = 0; f < 200; f++) begin
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (sdo != word[31 - i] || last != (i == 31)) begin
          failures++;
          $display("FAIL frame %0d bit %0d", f, i);
        end
        if (i == 31) begin
          @(posedge clk);
          word <= $urandom;
          frames++;
        end else begin
          @(posedge clk);
        end
        #1;
      end
    end
    checks++;
    if (frames != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
