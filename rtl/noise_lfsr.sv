// noise_lfsr: white-noise source of the sound application.
//
// A 16-bit Fibonacci linear feedback shift register with the maximal-length
// polynomial x^16 + x^14 + x^13 + x^11 + 1, stepped once per clk cycle. Its
// state, read as a signed sample, is the noise that the application drives
// on whichever DAC channel of the SndBus is inactive; a correct driver never
// lets it reach the codec. The sequence repeats every 65535 cycles and never
// enters the all-zero state. That the noise comes from an LFSR follows the
// specification; the polynomial and the seed are this design's choices. rstn is an
// asynchronous active-low reset to SEED (must be non-zero).
module noise_lfsr
  import snd_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic    clk,
  input  logic    rstn,
  output sample_t noise
);

  logic [15:0] state;
  logic        fb;

  assign fb = state[15] ^ state[13] ^ state[12] ^ state[10];

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) state <= SEED;
    else       state <= {state[14:0], fb};
  end

  assign noise = sample_t'(state);

endmodule
