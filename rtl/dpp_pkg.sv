// dpp_pkg: widths, fixed-point formats and shared types of the digital pulse
// processing chain.
//
// The chain runs at the ADC sample clock (80-100 MHz), one sample per clock,
// with no trigger: every sample is filtered and searched for peaks. The ADC
// resolution (12 bits) and the filter form (a two-pole, two-zero IIR) follow
// the reference system this RTL reimplements. The fixed-point formats are this
// design's own choice:
//   * filter coefficients are signed Q2.30 (range -2 .. +2), wide enough that
//     the pole-zero zero a1/a0 can sit within 1e-8 of a preamplifier pole that
//     is itself only 1e-4 below 1;
//   * baseline-subtracted samples are signed 14 bit;
//   * peak amplitudes are unsigned 16 bit and travel to the readout in a
//     24-bit CAMAC word.
package dpp_pkg;

  localparam int ADC_W     = 12;  // fast ADC resolution
  localparam int SAMP_W    = 14;  // signed sample after baseline subtraction
  localparam int COEF_W    = 32;  // filter coefficient width
  localparam int COEF_FRAC = 30;  // fraction bits of a coefficient (Q2.30)
  localparam int SHAPED_W  = 18;  // signed shaped-pulse sample at filter output
  localparam int AMP_W     = 16;  // peak amplitude width
  localparam int CAMAC_W   = 24;  // CAMAC read/write line count

  // Coefficients of y(n) = b1 y(n-1) + b2 y(n-2) + a0 x(n) + a1 x(n-1) + a2 x(n-2)
  typedef struct packed {
    logic signed [COEF_W-1:0] b1;
    logic signed [COEF_W-1:0] b2;
    logic signed [COEF_W-1:0] a0;
    logic signed [COEF_W-1:0] a1;
    logic signed [COEF_W-1:0] a2;
  } iir_coef_t;

  // One detected pulse as it is buffered and read out.
  typedef struct packed {
    logic             pileup;  // peak rose out of the tail of an earlier one
    logic [AMP_W-1:0] amp;     // filtered pulse maximum above baseline
  } peak_t;

  localparam int PEAK_W = $bits(peak_t);

  // Readout word on the CAMAC R lines: bit 23 pile-up, bits 15..0 amplitude.
  function automatic logic [CAMAC_W-1:0] peak_to_word(peak_t p);
    logic [CAMAC_W-1:0] w;
    w = '0;
    w[CAMAC_W-1] = p.pileup;
    w[AMP_W-1:0] = p.amp;
    return w;
  endfunction

endpackage
