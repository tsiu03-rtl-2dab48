// ctrl: timing generator of the sound driver.
//
// A free-running 10-bit counter, cntr, wraps once per stereo frame (1024
// clk cycles). Every control signal of the driver is decoded from its bits:
//   mclk   = ~cntr[1]          12.5 MHz master clock of the codec
//   bclk   =  cntr[3]          3.125 MHz bit clock (mclk/4)
//   men    = cntr[1:0] == 3    one clk cycle just before each rising mclk
//   SCCnt  = cntr[3:2]         mclk period within the bclk period
//   BitCnt = cntr[8:4]         bit slot 0..31 within the channel half
//   adclrc = daclrc = cntr[9]  '1' while the left channel is on the serial side
//   lrsel  = ~cntr[9]          '1' while the left channel is on the SndBus side
//   ADC_en = cntr[8:0] == 0    one-cycle pulse on each lrsel change
// The counter, the bit assignment and the signal polarities follow the
// specification; the outputs are combinational decodes of the registered
// counter, so each changes on the clk edge that moves the counter. rstn is
// an asynchronous active-low reset to cntr = 0 (a design choice).
module ctrl
  import snd_pkg::*;
(
  input  logic                clk,
  input  logic                rstn,
  output logic                mclk,
  output logic                bclk,
  output logic                adclrc,
  output logic                daclrc,
  output logic                lrsel,
  output logic                adc_en,
  output logic                men,
  output logic [SCCNT_W-1:0]  sccnt,
  output logic [BITCNT_W-1:0] bitcnt
);

  logic [CNTR_W-1:0] cntr;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) cntr <= '0;
    else       cntr <= cntr + 1'b1;
  end

  always_comb begin
    mclk   = ~cntr[1];
    bclk   =  cntr[3];
    men    = (cntr[1:0] == 2'b11);
    sccnt  = cntr[3:2];
    bitcnt = cntr[8:4];
    adclrc = cntr[9];
    daclrc = cntr[9];
    lrsel  = ~cntr[9];
    adc_en = (cntr[8:0] == '0);
  end

endmodule
