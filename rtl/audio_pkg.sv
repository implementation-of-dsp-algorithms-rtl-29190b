// audio_pkg: types and helpers shared by the audio effect datapath.
//
// Samples are 12-bit two's complement values, the width of the board's ADC
// and DAC. Gains are 8-bit unsigned fixed point with 7 fraction bits, so
// 128 is a gain of exactly 1.0 and 255 is just under 2.0. The 12-bit width is
// the document's; the gain format and the saturating arithmetic are this
// design's own choice.
package audio_pkg;

  localparam int unsigned SAMPLE_W  = 12;
  localparam int unsigned GAIN_W    = 8;
  localparam int unsigned GAIN_FRAC = 7;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [GAIN_W-1:0]   gain_t;

  localparam sample_t SAMPLE_MAX = sample_t'(2**(SAMPLE_W-1) - 1);
  localparam sample_t SAMPLE_MIN = sample_t'(-(2**(SAMPLE_W-1)));

  // Effect selected by the DIP switches.
  typedef enum logic [1:0] {
    FX_BYPASS = 2'd0,
    FX_ECHO   = 2'd1,
    FX_CHORUS = 2'd2,
    FX_MUTE   = 2'd3
  } fx_mode_e;

  // Product of a sample and a gain, before the fraction bits are dropped.
  function automatic logic signed [SAMPLE_W+GAIN_W:0] scale(sample_t s, gain_t g);
    return s * $signed({1'b0, g});
  endfunction

  // Clamp a wide signed value into the sample range.
  function automatic sample_t sat(logic signed [31:0] v);
    if (v > 32'(signed'(SAMPLE_MAX))) return SAMPLE_MAX;
    if (v < 32'(signed'(SAMPLE_MIN))) return SAMPLE_MIN;
    return sample_t'(v);
  endfunction

endpackage
