// sound_analyser: output level indicator of the sound application.
//
// For every output sample (valid = '1') the sample is squared, and the
// square (instantaneous power, up to 2^30) is smoothed by a first order low
// pass filter:
//   filt <= filt + (sample^2 - filt) / 2^LPF_SHIFT
// The LEDs then show filt on a thermometer-coded logarithmic scale taken
// straight from the filter bits: led[i] = '1' when filt >= 2^(LED_BASE+i),
// i.e. 3 dB of power per LED, led[0] being the quietest step. The squarer,
// the first order filter and picking bits for a dB thermometer follow the
// specification; LPF_SHIFT, LED_BASE and the LED count are this design's choices.
// led is a combinational decode of the filt register, so it follows a
// sample one clk cycle after valid. rstn resets filt to 0.
module sound_analyser
  import snd_pkg::*;
#(
  parameter int unsigned NLED      = 18,
  parameter int unsigned LPF_SHIFT = 8,
  parameter int unsigned LED_BASE  = 12
) (
  input  logic            clk,
  input  logic            rstn,
  input  logic            valid,
  input  sample_t         sample,
  output logic [NLED-1:0] led
);

  localparam int unsigned PW = 2 * SAMPLE_W;       // width of sample^2 (max 2^30)

  logic signed [PW-1:0] s_ext;
  logic [PW-1:0]        sq;
  logic [PW-1:0]        filt;
  logic signed [PW+1:0] diff;

  always_comb begin
    s_ext = PW'(sample);
    sq    = $unsigned(s_ext * s_ext);
    diff = $signed({2'b00, sq}) - $signed({2'b00, filt});
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)      filt <= '0;
    else if (valid) filt <= PW'($signed({2'b00, filt}) + (diff >>> LPF_SHIFT));
  end

  always_comb begin
    for (int i = 0; i < NLED; i++)
      led[i] = (filt >> (LED_BASE + i)) != '0;
  end

endmodule
