`timescale 1ns / 1ps
// wm8731_model: behavioural model of the serial sample port of the WM8731
// audio codec, for simulation only (not synthesizable hardware).
//
// Models the chip as a slave on its digital audio interface, in the format
// the driver produces: adclrc / daclrc = '1' selects the left channel, each
// channel half carries a 16-bit two's complement sample MSB first, then
// don't-care bits. ADC side: at every adclrc edge the model samples the
// "analogue" input level of the channel now selected (adc_l or adc_r),
// puts its MSB on adcdat, and moves to the next bit on each falling bclk;
// after 16 bits it sends pseudo-random filler. DAC side: it reads dacdat on
// every rising bclk and, after the 16th bit of a half, publishes the word on
// dac_l or dac_r, sets dac_last_left and increments dac_words. mclk is not
// used by the model. Analogue conversion, filtering and the I2C control
// port are not modelled.
module wm8731_model
  import snd_pkg::*;
(
  input  logic    mclk,
  input  logic    bclk,
  input  logic    adclrc,
  output logic    adcdat,
  input  logic    daclrc,
  input  logic    dacdat,
  input  sample_t adc_l,
  input  sample_t adc_r,
  output sample_t dac_l,
  output sample_t dac_r,
  output logic    dac_last_left,
  output int      dac_words
);

  sample_t     cur;
  int          bit_i = 0;
  logic        lrc_seen = 1'b0;
  logic [15:0] filler = 16'h5A3C;

  initial begin
    adcdat = 1'b0; dac_l = '0; dac_r = '0; dac_words = 0; dac_last_left = 1'b0;
    cur = '0;
  end

  always @(negedge bclk) begin
    #1;
    if (adclrc != lrc_seen) begin
      lrc_seen = adclrc;
      bit_i    = 0;
      cur      = adclrc ? adc_l : adc_r;
      filler   = {filler[14:0], filler[15] ^ filler[13] ^ filler[12] ^ filler[10]};
    end else begin
      bit_i++;
    end
    adcdat = (bit_i < 16) ? cur[15 - bit_i] : filler[bit_i % 16];
  end

  logic [15:0] word;
  int          rx_i = 99;
  logic        dlrc_seen = 1'b0;
  always @(posedge bclk) begin
    if (daclrc != dlrc_seen) begin
      dlrc_seen = daclrc; rx_i = 0; word = '0;
    end
    if (rx_i < 16) begin
      word = {word[14:0], dacdat};
      rx_i++;
      if (rx_i == 16) begin
        if (daclrc) dac_l = sample_t'(word); else dac_r = sample_t'(word);
        dac_last_left = daclrc;
        dac_words++;
      end
    end
  end

  // mclk is the chip's internal operating clock; nothing here depends on it.
  logic mclk_unused;
  assign mclk_unused = mclk;

endmodule
