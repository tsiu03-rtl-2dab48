// tb_sound_analyser: self-checking testbench of the output level indicator.
//
// Feeds blocks of 3000 samples of constant magnitude A with alternating sign
// (so the power is A^2 in every sample) and checks the settled LED pattern:
// a thermometer code whose length is the number of LEDs i with
// A^2 >= 2^(12+i), derived here from A directly. The filter settles from
// below to within 2^8 of A^2, so test magnitudes are chosen away from those
// boundaries. It also checks that the filter smooths (one loud sample after
// silence does not light the full bar), that it decays after the sound
// stops, and that nothing changes while valid = '0'.
module tb_sound_analyser;
  import snd_pkg::*;

  localparam int NLED = 18;
  logic clk = 1'b0, rstn = 1'b1, valid = 1'b0;
  sample_t sample = '0;
  logic [NLED-1:0] led;
  int checks = 0, failures = 0;

  sound_analyser dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s led=%b at %0t", what, led, $time);
    end
  endtask

  function automatic int expect_lit(input int a);
    longint p;
    int n;
    p = longint'(a) * longint'(a);
    n = 0;
    for (int i = 0; i < NLED; i++) if (p >= (longint'(1) << (12 + i))) n++;
    return n;
  endfunction

  function automatic logic [NLED-1:0] thermo(input int n);
    return NLED'((longint'(1) << n) - 1);
  endfunction

  task automatic feed(input int a, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      valid = 1'b1;
      sample = sample_t'((k % 2) ? -a : a);
      @(negedge clk);
      valid = 1'b0;
      sample = sample_t'($urandom);   // ignored while valid = '0'
    end
    @(negedge clk);
  endtask

  int amps[8] = '{0, 100, 1000, 3000, 10000, 20000, 32767, 32768};

  initial begin
    #1 rstn = 1'b0;
    #20 rstn = 1'b1;
    check(led == '0, "dark after reset");
    // one loud sample after silence: smoothed
    feed(20000, 1);
    check(led != thermo(expect_lit(20000)), "first sample smoothed");
    foreach (amps[j]) begin
      feed(amps[j] == 32768 ? -32768 : amps[j], 3000);
      check(led == thermo(expect_lit(amps[j])), $sformatf("level for A=%0d", amps[j]));
    end
    // valid = '0': a large sample held for a long time changes nothing
    begin
      logic [NLED-1:0] held;
      held = led;
      feed(0, 1);
      held = led;
      @(negedge clk) sample = sample_t'(16'h7FFF);
      repeat (500) @(negedge clk);
      check(led == held, "no update without valid");
    end
    // decay after the sound stops
    feed(32767, 3000);
    feed(0, 200);
    check(led != thermo(expect_lit(32767)) && led != '0, "partial decay");
    feed(0, 5000);
    check(led == '0, "dark after silence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
