// channel_mod: one bidirectional audio channel of the sound driver.
//
// The same module serves the left and the right channel; it only sees sel.
// While sel = '1' the channel is on the SndBus side: RXReg is offered on the
// adc bus, and a dac_en pulse loads TXReg from the dac bus. While sel = '0'
// the channel is on the serial side:
//   - RXReg shifts adcdat in from the right on the clk cycle where men = '1'
//     and SCCnt = "01" (bclk about to rise), for bit slots 0..15 only, so
//     the 16-bit sample (MSB first) ends up aligned and is not shifted out.
//   - TXReg shifts left on men = '1' and SCCnt = "11" (bclk about to fall).
//     It keeps shifting after slot 15; those slots carry don't-care bits.
//   - dacdat is the MSB of TXReg with no register in between, so the first
//     bit is on the line as soon as sel falls.
// When sel = '1' dacdat is forced to '0', so the two channels' outputs can
// be merged with a single OR gate in the driver. The ADC bus shows RXReg at
// all times (the application only samples it on ADC_en). All of this follows
// the specification; the '0' fill of TXReg, the asynchronous reset to zero
// and the OR-merge variant of the dacdat problem are this design's choices.
module channel_mod
  import snd_pkg::*;
(
  input  logic                clk,
  input  logic                rstn,
  input  logic                men,
  input  logic [SCCNT_W-1:0]  sccnt,
  input  logic [BITCNT_W-1:0] bitcnt,
  input  logic                sel,
  input  logic                dac_en,
  output sample_t             adc,
  input  sample_t             dac,
  input  logic                adcdat,
  output logic                dacdat
);

  sample_t rx_reg;
  sample_t tx_reg;

  // rx: ADC part
  always_ff @(posedge clk or negedge rstn) begin : rx
    if (!rstn) begin
      rx_reg <= '0;
    end else if (!sel && men && sccnt == SC_BCLK_RISE && bitcnt < BITCNT_W'(SAMPLE_W)) begin
      rx_reg <= {rx_reg[SAMPLE_W-2:0], adcdat};
    end
  end

  // tx: DAC part
  always_ff @(posedge clk or negedge rstn) begin : tx
    if (!rstn) begin
      tx_reg <= '0;
    end else if (sel) begin
      if (dac_en) tx_reg <= dac;
    end else if (men && sccnt == SC_BCLK_FALL) begin
      tx_reg <= {tx_reg[SAMPLE_W-2:0], 1'b0};
    end
  end

  assign adc    = rx_reg;
  assign dacdat = tx_reg[SAMPLE_W-1] & ~sel;

endmodule
