`timescale 1ns / 1ps
// tb_snd_driver: self-checking testbench of the complete sound driver.
//
// The testbench plays both neighbours of the driver for 1 ms of 50 MHz clk:
//  - timing sanity: periods of mclk (80 ns), bclk (320 ns) and adclrc
//    (20.48 us) between rising edges; mclk = '1' and bclk = '0' right after
//    every adclrc edge; adclrc = daclrc = ~lrsel at all times; one ADC_en per
//    512 clk cycles.
//  - DAC path: on each ADC_en the application side answers after a random
//    delay (1..400 cycles) with one DAC_en pulse and a sample of a 3 kHz tone
//    (left and right with different phases) on the active DAC bus, while the
//    inactive DAC bus carries random noise. A decoder reads dacdat on every
//    rising bclk, collects the 16 bits after each daclrc edge and compares
//    them with the sample of that channel (daclrc = '1': left). It also
//    checks that the MSB is on dacdat right after the daclrc edge.
//  - ADC path: a codec model sends 1.5 kHz tone samples on adcdat, MSB first,
//    changing the bit on falling bclk (the first one at the adclrc edge),
//    followed by 16 random filler bits. On each ADC_en the sample of the
//    channel selected by lrsel must equal what was sent for it.
module tb_snd_driver;
  import snd_pkg::*;

  localparam real FS = 50.0e6 / 1024.0;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rstn = 1'b1;
  sample_t ladc, radc, ldac, rdac;
  logic lrsel, adc_en, dac_en;
  logic mclk, bclk, adclrc, adcdat, daclrc, dacdat;
  int checks = 0, failures = 0;

  snd_driver dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic sample_t tone(input real f, input int n, input real ph);
    return sample_t'($rtoi(20000.0 * $sin(2.0 * PI * f * n / FS + ph)));
  endfunction

  bit started = 0;

  // ---------------- timing sanity ----------------
  realtime t_mclk = -1, t_bclk = -1, t_lrc = -1;
  int n_period = 0;
  always @(posedge mclk) if (started) begin
    if (t_mclk >= 0) begin check($realtime - t_mclk == 80.0, "mclk period"); n_period++; end
    t_mclk = $realtime;
  end
  always @(posedge bclk) if (started) begin
    if (t_bclk >= 0) check($realtime - t_bclk == 320.0, "bclk period");
    t_bclk = $realtime;
  end
  always @(posedge adclrc) if (started) begin
    if (t_lrc >= 0) check($realtime - t_lrc == 20480.0, "adclrc period");
    t_lrc = $realtime;
  end
  always @(adclrc) if (started) begin
    #1;
    check(mclk == 1'b1 && bclk == 1'b0, "mclk=1, bclk=0 after adclrc edge");
  end
  always @(negedge clk) if (started) begin
    check(adclrc == daclrc && daclrc != lrsel, "adclrc = daclrc /= lrsel");
  end
  int last_adc_en = -1, cyc = 0;
  always @(posedge clk) if (started) begin
    cyc++;
    if (adc_en) begin
      if (last_adc_en >= 0) check(cyc - last_adc_en == 512, "ADC_en rate");
      last_adc_en = cyc;
    end
  end

  // ---------------- DAC path ----------------
  sample_t exp_l, exp_r;
  bit have_l = 0, have_r = 0;
  int n_dac = 0, n_words = 0;
  initial begin
    dac_en = 1'b0; ldac = '0; rdac = '0;
    wait (started);
    forever begin
      @(posedge clk);
      if (adc_en) begin
        bit left;
        int d;
        left = lrsel;
        d = 1 + ($urandom % 400);
        repeat (d) begin
          @(negedge clk);
          ldac = sample_t'($urandom); rdac = sample_t'($urandom);
        end
        @(negedge clk);
        if (left) begin ldac = tone(3000.0, n_dac, 0.0); exp_l = ldac; have_l = 1; end
        else      begin rdac = tone(3000.0, n_dac, 1.0); exp_r = rdac; have_r = 1; end
        dac_en = 1'b1;
        @(negedge clk);
        dac_en = 1'b0;
        ldac = sample_t'($urandom); rdac = sample_t'($urandom);
        if (!left) n_dac++;
      end
    end
  end

  logic [15:0] word;
  int idx = 99;
  logic dec_lrc = 1'b0;
  sample_t exp_word;
  bit exp_ok;
  always @(daclrc) if (started) begin
    // a new serial half starts: latch what this channel must carry
    exp_word = daclrc ? exp_l : exp_r;
    exp_ok   = daclrc ? have_l : have_r;
    #1;
    if (exp_ok) check(dacdat == exp_word[15], "dacdat MSB at daclrc edge");
  end
  always @(posedge bclk) if (started) begin
    if (daclrc != dec_lrc) begin
      dec_lrc = daclrc; idx = 0; word = '0;
    end
    if (idx < 16) begin
      word = {word[14:0], dacdat};
      idx++;
      if (idx == 16 && exp_ok) begin
        check(word == exp_word, "dacdat word");
        n_words++;
      end
    end
  end

  // ---------------- ADC path ----------------
  sample_t sent_l, sent_r, cur;
  bit have_sl = 0, have_sr = 0, chose_l = 0, chose_r = 0;
  int bit_i = 0, n_adc = 0, n_adc_chk = 0;
  logic [15:0] filler;
  logic lrc_seen = 1'b0;
  initial adcdat = 1'b0;
  always @(negedge bclk) if (started) begin
    #1;
    if (adclrc != lrc_seen) begin
      // channel that just finished is now complete on the codec side
      if (lrc_seen) have_sl = chose_l; else have_sr = chose_r;
      lrc_seen = adclrc;
      bit_i = 0;
      filler = 16'($urandom);
      if (adclrc) begin cur = tone(1500.0, n_adc, 0.5); sent_l = cur; chose_l = 1; end
      else        begin cur = tone(1500.0, n_adc, 2.0); sent_r = cur; chose_r = 1; n_adc++; end
    end else begin
      bit_i++;
    end
    adcdat = (bit_i < 16) ? cur[15 - bit_i] : filler[bit_i - 16];
  end
  always @(negedge clk) if (started && adc_en) begin
    if (lrsel && have_sl)  begin check(ladc == sent_l, "LADC sample"); n_adc_chk++; end
    if (!lrsel && have_sr) begin check(radc == sent_r, "RADC sample"); n_adc_chk++; end
  end

  initial begin
    #1 rstn = 1'b0;
    #55 rstn = 1'b1;
    started = 1;
    #1ms;
    check(n_period > 1000, "timing measured");
    check(n_words > 80,    "dac words decoded");
    check(n_adc_chk > 80,  "adc samples checked");
    $display("dac words %0d, adc samples %0d", n_words, n_adc_chk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
