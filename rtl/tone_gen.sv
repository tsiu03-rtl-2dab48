// tone_gen: sinusoid evaluator of the sound application.
//
// Turns a phase (one full turn = 2^16) into a sample of a sine wave of
// amplitude 2^(SAMPLE_W-3) = 8192, so two tones can be added to a sample
// with headroom. The sine is approximated piecewise by one parabola per
// half period: with x the position within the half period scaled to [0,1),
//   sin(2*pi*t) ~ +/- 4 x (1 - x),
// the sign given by the phase MSB. The error is below 6 % of the amplitude
// and the curve is continuous in value at every piece boundary.
// Purely combinational; the application shares one instance among its three
// tone frequencies by multiplexing the phase in over successive cycles. That
// a piecewise polynomial is used follows the specification; the two-parabola
// form and the amplitude are this design's choices.
module tone_gen
  import snd_pkg::*;
(
  input  logic [15:0] phase,
  output sample_t     value
);

  logic [14:0] x;
  logic [29:0] prod;
  logic [14:0] mag;

  always_comb begin
    x     = phase[14:0];
    prod  = 30'(x) * 30'(16'h8000 - {1'b0, x});   // 2^30 * x(1-x), at most 2^28
    mag   = 15'(prod >> 15);                      // 4 x (1-x) * 8192
    value = phase[15] ? -sample_t'(mag) : sample_t'(mag);
  end

endmodule
