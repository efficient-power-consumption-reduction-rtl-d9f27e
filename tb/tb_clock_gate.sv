// tb_clock_gate: clk runs with period 10; the enable changes at random
// times, also during the high phase of clk. The gated clock must rise
// exactly at the rising edges of clk where the enable held during the
// preceding low phase is 1, never at any other time, and must stay low
// while that enable is 0.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int exp_pulses = 0, got_pulses = 0, gated_cycles = 0;
  logic en_at_fall = 1'b0;

  clock_gate u_dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // enable seen at the end of the low phase (just before the rising edge)
  always @(negedge clk) begin
    #4.9 en_at_fall = en;
  end

  always @(posedge clk) begin
    #0.01;
    checks++;
    if (gclk !== en_at_fall) begin failures++; $display("FAIL at %0t gclk=%b exp=%b", $time, gclk, en_at_fall); end
    if (en_at_fall) exp_pulses++; else gated_cycles++;
  end

  always @(posedge gclk) begin
    got_pulses++;
    checks++;
    if (clk !== 1'b1) begin failures++; $display("FAIL gclk rose with clk low at %0t", $time); end
  end

  initial begin
    #3;
    for (int k = 0; k < 2000; k++) begin
      #($urandom_range(1, 17));
      en = 1'($urandom);
    end
    @(negedge clk); #1;
    checks++;
    if (got_pulses != exp_pulses) begin failures++; $display("FAIL pulses got=%0d exp=%0d", got_pulses, exp_pulses); end
    checks++;
    if (gated_cycles == 0 || exp_pulses == 0) begin failures++; $display("FAIL coverage"); end
    $display("pulses=%0d gated cycles=%0d", got_pulses, gated_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
