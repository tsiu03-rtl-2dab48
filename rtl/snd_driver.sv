// snd_driver: codec between the parallel SndBus and the WM8731 serial port.
//
// Structure: one ctrl (timing from a 10-bit frame counter) and two
// channel_mod instances. The left instance gets sel = lrsel, the right one
// sel = ~lrsel, so at any time one channel talks to the application while
// the other shifts bits to and from the codec. Each channel_mod drives '0'
// on its dacdat while it is on the SndBus side, so the single dacdat pin is
// the OR of the two.
//
// Timing: a stereo frame is 1024 clk cycles. lrsel = '1' (left on the bus)
// for cycles 0..511, '0' for 512..1023; ADC_en pulses on cycles 0 and 512
// with the finished sample on LADC / RADC. The application answers with
// DAC_en and the LDAC / RDAC sample any time before lrsel changes again.
// adclrc = daclrc = ~lrsel; the serial side moves a channel's sample in the
// half frame after the one where it was on the bus. An assertion checks the
// handshake rule that DAC_en answers ADC_en within those 512 cycles.
module snd_driver
  import snd_pkg::*;
(
  input  logic    clk,
  input  logic    rstn,
  // SndBus
  output sample_t ladc,
  output sample_t radc,
  input  sample_t ldac,
  input  sample_t rdac,
  output logic    lrsel,
  output logic    adc_en,
  input  logic    dac_en,
  // WM8731 serial interface
  output logic    mclk,
  output logic    bclk,
  output logic    adclrc,
  input  logic    adcdat,
  output logic    daclrc,
  output logic    dacdat
);

  logic                men;
  logic [SCCNT_W-1:0]  sccnt;
  logic [BITCNT_W-1:0] bitcnt;
  logic                lrsel_n;
  logic                dacdat_l, dacdat_r;

  ctrl inst_ctrl (
    .clk, .rstn, .mclk, .bclk, .adclrc, .daclrc, .lrsel, .adc_en,
    .men, .sccnt, .bitcnt
  );

  assign lrsel_n = ~lrsel;

  channel_mod inst_left (
    .clk, .rstn, .men, .sccnt, .bitcnt,
    .sel(lrsel), .dac_en, .adc(ladc), .dac(ldac), .adcdat, .dacdat(dacdat_l)
  );

  channel_mod inst_right (
    .clk, .rstn, .men, .sccnt, .bitcnt,
    .sel(lrsel_n), .dac_en, .adc(radc), .dac(rdac), .adcdat, .dacdat(dacdat_r)
  );

  assign dacdat = dacdat_l | dacdat_r;

  // SndBus handshake: the application answers every ADC_en with DAC_en
  // before the bus changes channel again (within 512 clk cycles).
  a_dac_en_in_time: assert property (
    @(posedge clk) disable iff (!rstn) adc_en |-> ##[1:511] dac_en
  ) else $error("DAC_en missing within 512 cycles of ADC_en");

endmodule
