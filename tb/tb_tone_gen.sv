// tb_tone_gen: self-checking testbench of the sinusoid evaluator.
//
// Sweeps the phase over a full turn in steps of 7 (plus the four quarter
// points) and compares the output with 8192 * sin(2 pi phase / 2^16)
// computed in floating point. The piecewise parabola must stay within 6 %
// of the amplitude (492) of the true sine, hit 0 and +/-8192 exactly at the
// zero crossings and peaks, and be odd-symmetric around half a turn.
module tb_tone_gen;
  import snd_pkg::*;

  localparam real PI = 3.14159265358979;
  logic [15:0] phase;
  sample_t value;
  int checks = 0, failures = 0;

  tone_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s phase=%0d value=%0d", what, phase, value);
    end
  endtask

  initial begin
    real ref_v, err, max_err;
    sample_t v0;
    max_err = 0.0;
    for (int p = 0; p < 65536; p += 7) begin
      phase = 16'(p);
      #1;
      ref_v = 8192.0 * $sin(2.0 * PI * p / 65536.0);
      err = ref_v - real'(value);
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
      check(err <= 492.0, "close to sine");
      v0 = value;
      phase = 16'(p + 32768);
      #1;
      check(value == -v0, "odd symmetry");
    end
    phase = 16'd0;     #1; check(value == 0,     "zero at 0");
    phase = 16'd16384; #1; check(value == 8192,  "peak at 1/4");
    phase = 16'd32768; #1; check(value == 0,     "zero at 1/2");
    phase = 16'd49152; #1; check(value == -8192, "trough at 3/4");
    $display("max error %0.1f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
