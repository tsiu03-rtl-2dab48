// tb_noise_lfsr: self-checking testbench of the white-noise LFSR.
//
// After reset the output must equal the seed. The testbench then steps the
// register and checks that (a) it never reaches zero, (b) it returns to the
// seed after exactly 65535 steps and not before (maximal length), and
// (c) the output is white enough to be noise: over one period the sign bit
// is '1' in 32768 states and two consecutive outputs differ in the sign in
// about half the steps.
module tb_noise_lfsr;
  import snd_pkg::*;

  logic clk = 1'b0, rstn = 1'b1;
  sample_t noise;
  int checks = 0, failures = 0;

  noise_lfsr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int period, neg, flips;
    sample_t seed, prev;
    #1 rstn = 1'b0;
    #20 rstn = 1'b1;
    seed = noise;
    check(seed == sample_t'(16'hACE1), "reset value is the seed");
    period = 0; neg = 0; flips = 0; prev = noise;
    do begin
      @(posedge clk); #1;
      period++;
      if (noise == 0) check(1'b0, "zero state");
      if (noise < 0) neg++;
      if (noise[15] != prev[15]) flips++;
      prev = noise;
    end while (noise != seed && period < 70000);
    check(period == 65535, "maximal period");
    check(neg == 32768, "sign balance");
    check(flips > 30000 && flips < 35536, "sign transitions");
    $display("period %0d neg %0d flips %0d", period, neg, flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
