// tb_tx_message: message-level test of the transmitter at its default
// parameters. Two random 24-bit messages are sent at a realistic data rate,
// one bit every BIT_CLKS = 4096 clocks (10 kbit/s with a 40.96 MHz clock,
// the fast end of the 1-10 kbit/s range the transmitter is meant for):
// the first with the ramp/comparator PWM, the second with the random PWM.
// A simple receiver in the testbench recovers every bit from both serial
// outputs. It recomputes the carrier of path 0 (group 0) and path 2
// (group 1) from their tuning words, takes the pulse level from the sign of
// each product, and decides the bit from the fraction of high pulses in the
// second half of the bit interval: group 0 sends the bit unshifted, group 1
// shifted by 180 degrees, so both must decode to the bit that was sent.
module tb_tx_message;
  import tx_pkg::*;
  localparam int BIT_CLKS = 4096;
  localparam int N_BITS   = 24;

  logic clk = 1'b0, rst = 1'b1;
  logic data_in = 1'b0, data_valid = 1'b0;
  mod_sel_e mod_sel = MOD_PWM;
  logic [3:0] pwm_res = 4'd7;
  logic [31:0] dp [4];
  logic [3:0] sel = 4'b1111;
  logic [1:0] tx_out, tx_last;

  int checks = 0, failures = 0;

  rf_transmitter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2 * N_BITS * BIT_CLKS + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int carrier(int p, longint n);
    longint unsigned ph;
    int idx;
    ph  = (longint'(n - 4) * longint'(dp[p])) % (64'd1 << 32);
    idx = int'(ph >> 22);
    return int'($floor(32767.0 * $sin(2.0 * 3.14159265358979 * idx / 1024.0) + 0.5));
  endfunction

  longint edge_n = 0;
  logic [31:0] frame [2];
  bit measuring = 0;
  int hi0, tot0, hi2, tot2;

  // receiver: decode frames of both groups
  always @(posedge clk) begin
    if (!rst) begin
      edge_n <= edge_n + 1;
      #1;
      if (edge_n >= 32) begin
        int bitpos;
        bitpos = int'(edge_n % 32);
        for (int g = 0; g < 2; g++) frame[g][31 - bitpos] = tx_out[g];
        if (bitpos == 31 && measuring) begin
          int a0, a2, c0, c2;
          a0 = int'($signed(frame[0][31:16]));
          a2 = int'($signed(frame[1][31:16]));
          c0 = carrier(0, edge_n - 31);
          c2 = carrier(2, edge_n - 31);
          if (c0 > 2 || c0 < -2) begin tot0++; if ((a0 > 0) == (c0 > 0)) hi0++; end
          if (c2 > 2 || c2 < -2) begin tot2++; if ((a2 > 0) == (c2 > 0)) hi2++; end
        end
      end
    end
  end

  task automatic send_message(input logic [N_BITS-1:0] msg, input mod_sel_e m);
    logic [N_BITS-1:0] rx0, rx2;
    int errors;
    mod_sel <= m;
    for (int i = N_BITS - 1; i >= 0; i--) begin
      @(posedge clk);
      data_in    <= msg[i];
      data_valid <= 1'b1;
      @(posedge clk);
      data_valid <= 1'b0;
      repeat (BIT_CLKS / 2 - 2) @(posedge clk);
      hi0 = 0; tot0 = 0; hi2 = 0; tot2 = 0;
      measuring = 1;
      repeat (BIT_CLKS / 2) @(posedge clk);
      measuring = 0;
      rx0[i] = (2 * hi0 < tot0);   // mostly low pulses on the 0 degree path: a 1
      rx2[i] = (2 * hi2 > tot2);   // mostly high on the 180 degree path: a 1
      checks++;
      if (tot0 < 20 || tot2 < 20) begin
        failures++;
        $display("FAIL too few decodable frames in bit %0d", i);
      end
    end
    errors = 0;
    for (int i = 0; i < N_BITS; i++) begin
      checks += 2;
      if (rx0[i] != msg[i]) begin failures++; errors++; end
      if (rx2[i] != msg[i]) begin failures++; errors++; end
    end
    $display("%s: sent %h, group 0 received %h, group 1 received %h, %0d bit errors",
             m.name(), msg, rx0, rx2, errors);
  endtask

  initial begin
    dp[0] = 32'h0123_4567;
    dp[1] = 32'h0234_5679;
    dp[2] = 32'h0345_6781;
    dp[3] = 32'h00F0_F0F1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    send_message(N_BITS'($urandom), MOD_PWM);
    send_message(N_BITS'($urandom), MOD_RPWM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
