`timescale 1ns / 1ps
// tb_sound: end-to-end testbench of the whole audio system at its default
// parameters.
//
// The sound top (application + driver) runs against a behavioural model of
// the WM8731 serial port. The testbench draws a new random "analogue" level
// for both input channels in the middle of every channel half; the model
// samples it at the next adclrc edge and sends it on adcdat. Every sample
// then travels ADC -> driver -> SndBus -> application -> SndBus -> driver ->
// DAC, and the model decodes it from dacdat exactly one frame (1024 clk)
// after it was sent. For every decoded word the testbench computes what the
// application must have made of the input, from the switches in force when
// the sample crossed the bus:
//   forward (no switch)        exact copy of the input;
//   right / left tones (SW6/7) input + 440 Hz + 660 / 550 Hz tones of
//                              amplitude 8192, within 950, saturated;
//   mute (SW5)                 exactly 0.
// Exact matches also prove that the noise on the inactive DAC bus never
// reaches the codec. The run has 50 frames: 10 each of forward, right tones,
// left tones, both tones with near full-scale input (saturation) and mute.
// Each of these mechanisms, and the red LEDs lighting up, must occur.
module tb_sound;
  import snd_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FS = 50.0e6 / 1024.0;

  logic clk = 1'b0, rstn = 1'b1;
  logic [17:0] sw = '0;
  logic [17:0] ledr;
  logic mclk, bclk, adclrc, adcdat, daclrc, dacdat;
  sample_t adc_l = '0, adc_r = '0, dac_l, dac_r;
  logic dac_last_left;
  int dac_words;
  int checks = 0, failures = 0;

  sound dut (.*);
  wm8731_model codec (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s frame=%0d t=%0t", what, frame, $time);
    end
  endtask

  function automatic real tone(input real f, input int n);
    real c;
    c = f * n / FS;
    c = c - $floor(c);
    return 8192.0 * $sin(2.0 * PI * c);
  endfunction

  // frame n starts at the n-th falling adclrc edge after reset (frame 0 at reset)
  int frame = 0;
  logic [17:0] sw_at [0:63];
  bit loud = 0;
  bit started = 0;
  always @(negedge adclrc) if (started) frame++;

  // input levels: sampled by the model at each adclrc edge, changed mid-half
  sample_t cur_l = '0, prev_l = '0, cur_r = '0, prev_r = '0;
  always @(adclrc) if (started) begin
    #2;
    if (adclrc) begin prev_l = cur_l; cur_l = adc_l; end
    else        begin prev_r = cur_r; cur_r = adc_r; end
    #5000;
    adc_l = loud ? sample_t'(($urandom % 2 == 1) ? 31000 : -31000) : sample_t'(int'($urandom % 20001) - 10000);
    adc_r = loud ? sample_t'(($urandom % 2 == 1) ? 31000 : -31000) : sample_t'(int'($urandom % 20001) - 10000);
  end

  int n_fwd = 0, n_tr = 0, n_tl = 0, n_sat = 0, n_mute = 0, n_led = 0;
  always @(dac_words) if (frame >= 3) begin
    bit left;
    int n;
    logic [17:0] s;
    sample_t w, x;
    real expv;
    left = dac_last_left;
    n = left ? frame : frame - 1;     // frame in which the sample crossed the bus
    s = sw_at[n];
    w = left ? dac_l : dac_r;
    x = left ? prev_l : prev_r;
    if (s[5]) begin
      check(w == 0, "mute"); n_mute++;
    end else if (!(left ? s[7] : s[6])) begin
      check(w == x, "forward"); n_fwd++;
    end else begin
      real e;
      expv = real'(x) + tone(440.0, n) + (left ? tone(550.0, n) : tone(660.0, n));
      if (expv > 32767.0)  begin expv = 32767.0;  n_sat++; end
      if (expv < -32768.0) begin expv = -32768.0; n_sat++; end
      e = real'(w) - expv;
      if (e < 0) e = -e;
      check(e <= 950.0, left ? "left tones" : "right tones");
      if (left) n_tl++; else n_tr++;
    end
  end

  initial begin
    foreach (sw_at[i]) sw_at[i] = '0;
    #1 rstn = 1'b0;
    #55 rstn = 1'b1;
    started = 1;
    for (int f = 1; f <= 50; f++) begin
      @(negedge adclrc);
      #1;
      case (f)
        10: sw = 18'h40;                  // right tones
        20: sw = 18'h80;                  // left tones
        30: begin sw = 18'hC0; loud = 1; end   // both, near full scale
        40: begin sw = 18'h20; loud = 0; end   // mute
        default: ;
      endcase
      sw_at[f] = sw;
      if (f == 40) begin check(ledr[17:12] != '0, "LEDs light for loud output"); n_led++; end
    end
    check(n_fwd > 20,  "forward happened");
    check(n_tr > 5,    "right tones happened");
    check(n_tl > 5,    "left tones happened");
    check(n_sat > 0,   "saturation happened");
    check(n_mute > 10, "mute happened");
    check(n_led > 0,   "LED check happened");
    $display("fwd %0d tr %0d tl %0d sat %0d mute %0d words %0d", n_fwd, n_tr, n_tl, n_sat, n_mute, dac_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
