// snd_pkg: types and constants shared by the audio codec driver and the
// sound application.
//
// The SndBus carries 16-bit signed samples. One stereo frame lasts 1024
// system clock cycles (50 MHz / 1024, about 48.8 kSps per channel), kept in
// a 10-bit counter: each channel owns half a frame (512 cycles) on each
// side of the driver. The serial side transfers 32 bit slots per channel of
// which the first 16 carry the sample, MSB first.
package snd_pkg;

  localparam int unsigned SAMPLE_W   = 16;  // sample width on SndBus and serial link
  localparam int unsigned CNTR_W     = 10;  // frame counter: 1024 clk per frame
  localparam int unsigned BITCNT_W   = 5;   // counts the 32 bit slots of a channel
  localparam int unsigned SCCNT_W    = 2;   // counts 4 mclk periods per bclk period

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Value of SCCnt on the mclk edge that raises / lowers bclk.
  localparam logic [SCCNT_W-1:0] SC_BCLK_RISE = 2'b01;
  localparam logic [SCCNT_W-1:0] SC_BCLK_FALL = 2'b11;

endpackage
