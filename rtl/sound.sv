// sound: top level of the audio system.
//
// Glue only: my_fancy_application and snd_driver exchange samples over the
// SndBus (LADC, RADC, LDAC, RDAC, lrsel, ADC_en, DAC_en), and the driver
// talks to the external WM8731 codec over its serial pins. SW are the board
// switches (SW[5] mute, SW[6] right tones, SW[7] left tones), LEDR the red
// LEDs of the level indicator, clk the 50 MHz board clock and rstn the
// active-low reset key. The codec's I2C configuration is done elsewhere and
// is not part of this design.
module sound
  import snd_pkg::*;
#(
  parameter int unsigned NLED = 18,
  parameter int unsigned NSW  = 18
) (
  input  logic            clk,
  input  logic            rstn,
  input  logic [NSW-1:0]  sw,
  output logic [NLED-1:0] ledr,
  // WM8731 serial interface
  output logic            mclk,
  output logic            bclk,
  output logic            adclrc,
  input  logic            adcdat,
  output logic            daclrc,
  output logic            dacdat
);

  // SndBus
  sample_t ladc, radc, ldac, rdac;
  logic    lrsel, adc_en, dac_en;

  my_fancy_application #(.NLED(NLED), .NSW(NSW)) u_app (
    .clk, .rstn, .sw, .ledr,
    .ladc, .radc, .ldac, .rdac, .lrsel, .adc_en, .dac_en
  );

  snd_driver u_driver (
    .clk, .rstn,
    .ladc, .radc, .ldac, .rdac, .lrsel, .adc_en, .dac_en,
    .mclk, .bclk, .adclrc, .adcdat, .daclrc, .dacdat
  );

endmodule
