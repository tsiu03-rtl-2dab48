// tb_my_fancy_application: self-checking testbench of the sound application.
//
// The testbench acts as the sound driver on the SndBus: a frame counter k
// (0..1023) gives lrsel = '1' for k < 512 and an ADC_en pulse at k = 0 and
// k = 512, with a new random input sample on the active ADC channel. It runs
// 300 frames through five switch settings (forward, right tones, left tones,
// both tones with inputs near full scale, mute) and checks:
//  - DAC_en follows every ADC_en after exactly 4 clk cycles (< 512);
//  - the active DAC sample equals clamp(x + tones) where the tones are
//    8192 sin(2 pi f t) evaluated in floating point at t = frame / f_s
//    (f_s = 50 MHz / 1024); exact when no tone is on, within 950 (twice the
//    parabola error plus rounding) otherwise; 0 under mute;
//  - the active DAC sample holds until lrsel changes;
//  - the inactive DAC channel carries changing noise;
//  - the red LEDs light up for loud output and fall back under mute.
// Each mechanism (forward, right tones, left tones, saturation, mute, noise,
// LED activity) is counted and must have occurred.
module tb_my_fancy_application;
  import snd_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FS = 50.0e6 / 1024.0;

  logic clk = 1'b0, rstn = 1'b1;
  logic [17:0] sw = '0;
  logic [17:0] ledr;
  sample_t ladc, radc, ldac, rdac;
  logic lrsel, adc_en, dac_en;
  int checks = 0, failures = 0;

  my_fancy_application dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s frame=%0d k=%0d", what, frame, k);
    end
  endtask

  function automatic real tone(input real f, input int n);
    real cyc;
    cyc = f * n / FS;
    cyc = cyc - $floor(cyc);
    return 8192.0 * $sin(2.0 * PI * cyc);
  endfunction

  logic [9:0] k = '0;
  int frame = 0;
  logic run = 1'b0;
  assign lrsel  = ~k[9];
  assign adc_en = run && (k[8:0] == 0);

  sample_t x;
  int lat = -1;
  int n_fwd = 0, n_tr = 0, n_tl = 0, n_sat = 0, n_mute = 0, n_noise = 0, n_led = 0, n_dark = 0;
  sample_t held;
  bit have_held = 0;
  sample_t prev_noise;
  logic [17:0] loud_led;

  always @(posedge clk) if (run) begin
    k <= k + 1'b1;
    if (k == 10'd1023) frame <= frame + 1;
  end

  // new input sample on the active channel at each ADC_en
  always @(negedge clk) if (run) begin
    if (k[8:0] == 0) begin
      int big;
      big = (frame >= 60 && frame < 80);
      x = big ? sample_t'(($urandom % 2 == 1) ? 30000 : -30000) : sample_t'(int'($urandom % 20001) - 10000);
      if (lrsel) ladc = x; else radc = x;
      lat = 0;
      have_held = 0;
    end else if (lat >= 0) begin
      lat++;
    end
    // the inactive DAC channel must be noise
    if (k[8:0] > 10) begin
      sample_t nz;
      nz = lrsel ? rdac : ldac;
      if (nz != prev_noise) n_noise++;
      prev_noise = nz;
    end
    if (dac_en) begin
      real expv;
      sample_t y;
      bit gen, exact;
      y = lrsel ? ldac : rdac;
      check(lat == 4, "DAC_en latency");
      gen = lrsel ? sw[7] : sw[6];
      expv = real'(x);
      if (gen) expv += tone(440.0, frame) + (lrsel ? tone(550.0, frame) : tone(660.0, frame));
      if (expv > 32767.0)  begin expv = 32767.0;  n_sat++; end
      if (expv < -32768.0) begin expv = -32768.0; n_sat++; end
      if (sw[5]) begin
        check(y == 0, "mute"); n_mute++;
      end else if (!gen) begin
        check(y == x, "forward"); n_fwd++;
      end else begin
        real e;
        e = real'(y) - expv;
        if (e < 0) e = -e;
        check(e <= 950.0, "tones");
        if (lrsel) n_tl++; else n_tr++;
      end
      held = y;
      have_held = 1;
      lat = -1;
    end
    if (k[8:0] == 511 && have_held)
      check((lrsel ? ldac : rdac) == held, "DAC sample held until lrsel changes");
    if (k == 1023) begin
      if (frame == 79) begin check(ledr[17:10] != '0, "LEDs for loud output"); n_led++; loud_led = ledr; end
      if (frame == 299) begin check($countones(ledr) < $countones(loud_led), "LEDs fall under mute"); n_dark++; end
    end
  end

  initial begin
    ladc = '0; radc = '0;
    #1 rstn = 1'b0;
    #55 rstn = 1'b1;
    @(negedge clk) run = 1'b1;
    wait (frame == 20); sw = 18'h40;    // right tones
    wait (frame == 40); sw = 18'h80;    // left tones
    wait (frame == 60); sw = 18'hC0;    // both, near full scale
    wait (frame == 80); sw = 18'h20;    // mute
    wait (frame == 300);
    check(n_fwd > 0,  "forward happened");
    check(n_tr > 0,   "right tones happened");
    check(n_tl > 0,   "left tones happened");
    check(n_sat > 0,  "saturation happened");
    check(n_mute > 0, "mute happened");
    check(n_noise > 1000, "noise on inactive channel");
    check(n_led > 0 && n_dark > 0, "LED checks happened");
    $display("fwd %0d tr %0d tl %0d sat %0d mute %0d noise %0d", n_fwd, n_tr, n_tl, n_sat, n_mute, n_noise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
