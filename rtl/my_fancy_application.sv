// my_fancy_application: the sound processing application on the SndBus.
//
// Per sample (one ADC_en pulse, channel given by lrsel, '1' = left):
//   - forward: the input sample x of the active channel is passed on;
//   - tones: with SW[6] the right channel gets 440 Hz + 660 Hz added, with
//     SW[7] the left channel 440 Hz + 550 Hz;
//   - mute: with SW[5] the output is 0;
//   - the result (saturated to 16 bits) is written to LDAC or RDAC with a
//     one-cycle DAC_en pulse, and fed to the level analyser (red LEDs);
//   - the DAC channel that is not active carries white noise from an LFSR.
// One tone_gen evaluates all three tones; each tone has its own 24-bit
// phase accumulator, advanced once per stereo frame (after the right channel)
// by round(f * 2^24 * 1024 / f_clk). A four-state sequencer does the work:
// IDLE --ADC_en--> TONE_A (440 Hz) -> TONE_B (550/660 Hz) -> OUT -> IDLE,
// so DAC_en follows ADC_en by four clk cycles, well inside the 512-cycle
// limit of the bus. The function list follows the specification; the sequencer,
// the amplitudes (8192 per tone), the saturation and all widths are this
// design's choices. rstn is an asynchronous active-low reset.
module my_fancy_application
  import snd_pkg::*;
#(
  parameter int unsigned  PHASE_W  = 24,
  parameter int unsigned  F_CLK    = 50_000_000,
  parameter int unsigned  NLED     = 18,
  parameter int unsigned  NSW      = 18,
  // Switch numbers, from the specification.
  parameter int unsigned  SW_MUTE  = 5,
  parameter int unsigned  SW_GEN_R = 6,
  parameter int unsigned  SW_GEN_L = 7
) (
  input  logic            clk,
  input  logic            rstn,
  input  logic [NSW-1:0]  sw,
  output logic [NLED-1:0] ledr,
  // SndBus
  input  sample_t         ladc,
  input  sample_t         radc,
  output sample_t         ldac,
  output sample_t         rdac,
  input  logic            lrsel,
  input  logic            adc_en,
  output logic            dac_en
);

  // Phase increment per frame of 2^CNTR_W clk cycles, rounded.
  function automatic logic [PHASE_W-1:0] phase_inc(input longint unsigned f_hz);
    longint unsigned num;
    num = (f_hz << (PHASE_W + CNTR_W)) + 64'(F_CLK) / 2;
    return PHASE_W'(num / 64'(F_CLK));
  endfunction

  localparam logic [PHASE_W-1:0] INC_440 = phase_inc(440);
  localparam logic [PHASE_W-1:0] INC_550 = phase_inc(550);
  localparam logic [PHASE_W-1:0] INC_660 = phase_inc(660);

  typedef enum logic [1:0] {S_IDLE, S_TONE_A, S_TONE_B, S_OUT} state_t;

  state_t                   state;
  logic                     chan_left;
  sample_t                  x;
  logic signed [SAMPLE_W+1:0] acc;
  logic [PHASE_W-1:0]       ph_440, ph_550, ph_660;
  logic [15:0]              tone_phase;
  sample_t                  tone;
  logic                     gen;
  logic signed [SAMPLE_W+1:0] sum;
  sample_t                  y, y_r;
  sample_t                  ldac_r, rdac_r;
  sample_t                  noise;

  assign gen = chan_left ? sw[SW_GEN_L] : sw[SW_GEN_R];

  always_comb begin
    if (state == S_TONE_A) tone_phase = ph_440[PHASE_W-1 -: 16];
    else if (chan_left)    tone_phase = ph_550[PHASE_W-1 -: 16];
    else                   tone_phase = ph_660[PHASE_W-1 -: 16];
  end

  tone_gen u_tone (.phase(tone_phase), .value(tone));

  // Saturating sum of the input and the tones, then mute.
  always_comb begin
    sum = (SAMPLE_W+2)'(x) + acc;
    if (sum > (SAMPLE_W+2)'(sample_t'(16'h7FFF)))      y = sample_t'(16'h7FFF);
    else if (sum < (SAMPLE_W+2)'(sample_t'(16'h8000))) y = sample_t'(16'h8000);
    else                                                y = sample_t'(sum);
    if (sw[SW_MUTE]) y = '0;
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state     <= S_IDLE;
      chan_left <= 1'b0;
      x         <= '0;
      acc       <= '0;
      ph_440    <= '0;
      ph_550    <= '0;
      ph_660    <= '0;
      ldac_r    <= '0;
      rdac_r    <= '0;
      y_r       <= '0;
      dac_en    <= 1'b0;
    end else begin
      dac_en <= 1'b0;
      unique case (state)
        S_IDLE: if (adc_en) begin
          chan_left <= lrsel;
          x         <= lrsel ? ladc : radc;
          state     <= S_TONE_A;
        end
        S_TONE_A: begin
          acc   <= gen ? (SAMPLE_W+2)'(tone) : '0;
          state <= S_TONE_B;
        end
        S_TONE_B: begin
          if (gen) acc <= acc + (SAMPLE_W+2)'(tone);
          state <= S_OUT;
        end
        S_OUT: begin
          if (chan_left) ldac_r <= y;
          else           rdac_r <= y;
          y_r    <= y;
          dac_en <= 1'b1;
          if (!chan_left) begin
            ph_440 <= ph_440 + INC_440;
            ph_550 <= ph_550 + INC_550;
            ph_660 <= ph_660 + INC_660;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  noise_lfsr u_noise (.clk, .rstn, .noise);

  // The active channel shows its processed sample, the other one noise.
  assign ldac = lrsel ? ldac_r : noise;
  assign rdac = lrsel ? noise  : rdac_r;

  sound_analyser #(.NLED(NLED)) u_analyser (
    .clk, .rstn, .valid(dac_en), .sample(y_r), .led(ledr)
  );

endmodule
